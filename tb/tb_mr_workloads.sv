// The other configurations of the evaluation, run end to end with random
// sparse matrices of density one (one non-zero per column at most):
//   basic design on one FPGA, 12 x 12 cells, P = 1, K = 70 (144 x 144);
//   basic design pipelined for a 10 ns clock, 10 x 10, P = 1, K = 70,
//     two cycles per compare-exchange (100 x 100);
//   improved design pipelined for a 10 ns clock, 8 x 8, P = 16, K = 64,
//     two cycles per compare-exchange (1024 x 1024).
// Each multiplies twice and compares with A*v and A*A*v, checks the cycle
// budget P*D*(1 + X*MAXPH) + P + 2 and counts the mechanisms as the
// end-to-end test does.  The routing limit MAXPH is the design's 4*M for
// the two basic meshes.  The 8 x 8 mesh gets 6*M: with 16 routing
// iterations of a full-density random matrix, single iterations there
// were seen to need a few steps more than 4*M = 32, so the 4*M figure is
// an average-case budget rather than a bound.  The improved single-FPGA
// configuration at its default size is tb_mesh_routing_full.
module tb_mr_workloads;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        fin [3];
  int unsigned chk [3];
  int unsigned fl  [3];

  tb_mr_harness #(.M(12), .P(1), .D(1), .K(70), .LANES(1), .SEED(101), .DENS(100), .MAXPH(4*12)) u_basic (
    .clk(clk), .rst_n(rst_n), .finished(fin[0]), .checks(chk[0]), .failures(fl[0]));
  tb_mr_harness #(.M(10), .P(1), .D(1), .K(70), .LANES(1), .SEED(202), .DENS(100), .MAXPH(4*10), .X(2)) u_src_basic (
    .clk(clk), .rst_n(rst_n), .finished(fin[1]), .checks(chk[1]), .failures(fl[1]));
  tb_mr_harness #(.M(8), .P(16), .D(1), .K(64), .LANES(1), .SEED(303), .DENS(100), .MAXPH(6*8), .X(2)) u_src_imp (
    .clk(clk), .rst_n(rst_n), .finished(fin[2]), .checks(chk[2]), .failures(fl[2]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2]);
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2], fl[0] + fl[1] + fl[2]);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2], fl[0] + fl[1] + fl[2] + 1);
    $finish;
  end
endmodule
