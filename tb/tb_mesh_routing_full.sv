// Full-size test: the multiplier with every parameter at its default
// (12 x 12 mesh, P = 16 columns per cell, D = 1, K = 50, one load lane,
// 4*M = 48 compare-exchange steps per routing iteration), i.e. a random
// 2304 x 2304 sub-matrix with up to one entry per column times 50 vectors,
// then the same matrix applied again in place.  Every result word, the
// cycle budget of each multiplication and the occurrence of each mechanism
// are checked.
module tb_mesh_routing_full;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        fin;
  int unsigned chk, fl;

  tb_mr_harness #(.M(12), .P(16), .D(1), .K(50), .LANES(1), .SEED(2304), .FULL(1'b1), .MAXPH(48)) u_full (
    .clk(clk), .rst_n(rst_n), .finished(fin), .checks(chk), .failures(fl));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin);
    $display("TB_RESULT checks=%0d failures=%0d", chk, fl);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", chk, fl + 1);
    $finish;
  end
endmodule
