// Random test of the result store P' with its destination check.  Packets
// with random destinations (often this cell's) are offered; the test checks
// 'deliver' against the coordinate comparison, keeps its own copy of the P
// result words, xoring delivered vectors into the word picked by the low
// address bits, interleaves clears, and compares every word through the read
// port.
module tb_mr_result_unit;
  localparam int unsigned P = 4, K = 8, CW = 2, LW = 2;
  localparam logic [CW-1:0] ROW = 2, COL = 1;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic          check, pkt_valid, deliver, clr_en;
  logic [CW-1:0] pkt_row, pkt_col;
  logic [LW-1:0] pkt_lo, clr_addr, rd_addr;
  logic [K-1:0]  pkt_vec, rd_data;
  logic [K-1:0]  model [P];

  mr_result_unit #(.P(P), .K(K), .CW(CW), .LW(LW)) dut (
    .clk(clk), .own_row(ROW), .own_col(COL), .check(check), .pkt_valid(pkt_valid),
    .pkt_row(pkt_row), .pkt_col(pkt_col), .pkt_lo(pkt_lo), .pkt_vec(pkt_vec),
    .deliver(deliver), .clr_en(clr_en), .clr_addr(clr_addr), .rd_addr(rd_addr), .rd_data(rd_data));

  int unsigned n_deliver = 0;

  initial begin
    check = 0; pkt_valid = 0; clr_en = 0; pkt_row = 0; pkt_col = 0; pkt_lo = 0; pkt_vec = 0;
    clr_addr = 0; rd_addr = 0;
    // clear all words first
    for (int w = 0; w < P; w++) begin
      @(negedge clk); clr_en = 1; clr_addr = LW'(w); model[w] = '0;
    end
    @(negedge clk); clr_en = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check = ($urandom % 4) != 0; pkt_valid = $urandom;
      pkt_row = (($urandom % 2) == 0) ? ROW : CW'($urandom);
      pkt_col = (($urandom % 2) == 0) ? COL : CW'($urandom);
      pkt_lo = LW'($urandom); pkt_vec = K'($urandom);
      clr_en = 0;
      if (($urandom % 50) == 0) begin
        check = 0; clr_en = 1; clr_addr = LW'($urandom);
      end
      #1;
      checks++;
      if (deliver !== (check && pkt_valid && pkt_row == ROW && pkt_col == COL)) begin
        failures++; $display("FAIL deliver");
      end
      if (deliver) begin model[pkt_lo] ^= pkt_vec; n_deliver++; end
      if (clr_en) model[clr_addr] = '0;
      @(posedge clk); #1;
      check = 0; clr_en = 0;
      for (int w = 0; w < P; w++) begin
        rd_addr = LW'(w); #1;
        checks++;
        if (rd_data !== model[w]) begin
          failures++; if (failures < 10) $display("FAIL word %0d got %h exp %h", w, rd_data, model[w]);
        end
      end
    end
    checks++;
    if (n_deliver == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
