// Random test of the current packet register against a reference model.
// Each cycle drives a random mix of fetch, step, exchange, annihilate,
// eq_packet and deliver with random packets and compares the combinational
// candidate and the registered CR with the model (fetch wins over step;
// annihilate over merge over exchange; deliver clears the status bit).
module tb_mr_current_packet;
  localparam int unsigned K = 6, PKT_W = 1 + 2*3 + 2 + K;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic             fetch, step, exchange, annihilate, eq_packet, deliver;
  logic [PKT_W-1:0] fetch_pkt, new_pkt, cand, cr, model;

  mr_current_packet #(.PKT_W(PKT_W), .K(K)) dut (.*);

  function automatic logic [PKT_W-1:0] next_of(logic [PKT_W-1:0] c);
    logic [PKT_W-1:0] n = c;
    if (fetch) n = fetch_pkt;
    else if (step) begin
      if (annihilate)     n[PKT_W-1] = 1'b0;
      else if (eq_packet) n = {c[PKT_W-1:K], c[K-1:0] ^ new_pkt[K-1:0]};
      else if (exchange)  n = new_pkt;
    end
    return n;
  endfunction

  initial begin
    {fetch, step, exchange, annihilate, eq_packet, deliver} = '0;
    fetch_pkt = '0; new_pkt = '0; model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      fetch = ($urandom % 6) == 0; step = ($urandom % 3) != 0;
      exchange = $urandom; annihilate = ($urandom % 4) == 0; eq_packet = ($urandom % 5) == 0;
      deliver = (fetch || step) && (($urandom % 6) == 0);
      fetch_pkt = PKT_W'({$urandom, $urandom}); new_pkt = PKT_W'({$urandom, $urandom});
      #1;
      checks++;
      if (cand !== next_of(model)) begin failures++; $display("FAIL cand %h exp %h", cand, next_of(model)); end
      if (fetch || step) begin
        model = next_of(model);
        if (deliver) model[PKT_W-1] = 1'b0;
      end
      @(posedge clk); #1;
      checks++;
      if (cr !== model) begin failures++; if (failures < 10) $display("FAIL cr %h exp %h", cr, model); end
    end
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
