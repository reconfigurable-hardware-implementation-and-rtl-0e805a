// End-to-end test of the mesh-routing multiplier at reduced sizes.
// Four configurations run side by side, each from its own random matrix:
//   improved design, M = 4, P = 4, D = 2, K = 8, one load lane
//   improved design, M = 4, P = 2, D = 1, K = 5, two load lanes (hybrid)
//   basic design,    M = 6, P = 1, D = 1, K = 3, one load lane
//   improved design, M = 5, P = 2, D = 2, K = 4, two cycles per
//                    compare-exchange (register R1 in every cell)
// Each multiplies twice (A*v, then A*A*v in place) and checks every result
// word, the cycle budget and that every mechanism occurred.  The routing step
// limit is raised to 8*M here: the document's 4*M budget is met by 12 x 12
// meshes (see tb_mesh_routing_full) but not always by meshes this small.
module tb_mesh_routing_top;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        fin [4];
  int unsigned chk [4];
  int unsigned fl  [4];

  tb_mr_harness #(.M(4), .P(4), .D(2), .K(8), .LANES(1), .SEED(11), .MAXPH(8*4)) u_imp (
    .clk(clk), .rst_n(rst_n), .finished(fin[0]), .checks(chk[0]), .failures(fl[0]));
  tb_mr_harness #(.M(4), .P(2), .D(1), .K(5), .LANES(2), .SEED(22), .MAXPH(8*4)) u_lanes (
    .clk(clk), .rst_n(rst_n), .finished(fin[1]), .checks(chk[1]), .failures(fl[1]));
  tb_mr_harness #(.M(6), .P(1), .D(1), .K(3), .LANES(1), .SEED(33), .DENS(100), .MAXPH(8*6)) u_basic (
    .clk(clk), .rst_n(rst_n), .finished(fin[2]), .checks(chk[2]), .failures(fl[2]));
  tb_mr_harness #(.M(5), .P(2), .D(2), .K(4), .LANES(1), .SEED(44), .MAXPH(8*5), .X(2)) u_r1 (
    .clk(clk), .rst_n(rst_n), .finished(fin[3]), .checks(chk[3]), .failures(fl[3]));

  int unsigned cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2] + chk[3], fl[0] + fl[1] + fl[2] + fl[3]);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2] + chk[3], fl[0] + fl[1] + fl[2] + fl[3] + 1);
    $finish;
  end
endmodule
