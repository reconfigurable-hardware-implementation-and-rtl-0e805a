// Test of the cell array alone, driven with operation codes from the test
// bench instead of the control unit.  Configuration: an odd mesh side
// (M = 3), so the last row and column have no partner in some phases, and
// three load lanes (one per row), so every lane has its own chains.
// Sequence: clear and load random packet slots, clear and load random
// vectors with gaps in the valid signal, check that the mesh reports full
// exactly when the last word went in, run P*D routing iterations (fetch, then
// compare-exchange steps in the order up, right, down, left until busy
// drops), check that no iteration takes more than 8*M steps and that the
// number of packets in flight never grows, copy, unload with back-pressure
// and compare every word with A*v computed here.
module tb_mr_mesh
  import mr_pkg::*;
;
  localparam int unsigned M = 3, P = 2, D = 2, K = 6, LANES = 3;
  localparam int unsigned CW = idx_w(M), LW = idx_w(P), FW = idx_w(P*D);
  localparam int unsigned LPKT_W = 1 + 4*CW + 2*LW;
  localparam int unsigned N = M*M*P, CPL = M*M/LANES;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  mesh_op_e                     op = OP_IDLE;
  phase_e                       phase = PH_UP;
  logic [FW-1:0]                fetch_idx = '0;
  logic [LW-1:0]                copy_idx = '0;
  logic [LANES-1:0][LPKT_W-1:0] pkt_in = '0;
  logic [LANES-1:0]             vec_in_valid = '0;
  logic [LANES-1:0][K-1:0]      vec_in = '0;
  logic [LANES-1:0]             res_valid;
  logic [LANES-1:0][K-1:0]      res_data;
  logic [LANES-1:0]             res_ready = '0;
  logic                         busy, vec_done;

  mr_mesh #(.M(M), .P(P), .D(D), .K(K), .LANES(LANES)) dut (.*);

  // xorshift32 random source
  logic [31:0] rs = 32'h2545_F491;
  function automatic int unsigned rnd();
    rs = rs ^ (rs << 13);
    rs = rs ^ (rs >> 17);
    rs = rs ^ (rs << 5);
    return rs;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  int           ent_row [N][D];
  logic [K-1:0] vec [N];
  logic [K-1:0] expect1 [N];
  logic [K-1:0] got [N];

  function automatic logic [LPKT_W-1:0] make_slot(int cidx, int src, int row);
    int dcell;
    if (row < 0) return '0;
    dcell = row / int'(P);
    return {1'b1, CW'(dcell / int'(M)), CW'(dcell % int'(M)), LW'(row % int'(P)),
            CW'(cidx / int'(M)), CW'(cidx % int'(M)), LW'(src)};
  endfunction

  // number of valid packets held in the current-packet registers
  function automatic int unsigned in_flight();
    int unsigned n = 0;
    for (int i = 0; i < M*M; i++) n += dut.cell_busy[i];
    return n;
  endfunction

  initial begin
    int unsigned steps, worst, n_prev;
    for (int j = 0; j < N; j++) begin
      for (int s = 0; s < D; s++) ent_row[j][s] = (rnd() % 4 != 0) ? int'(rnd() % N) : -1;
      vec[j] = K'(rnd());
    end
    for (int i = 0; i < N; i++) expect1[i] = '0;
    for (int j = 0; j < N; j++)
      for (int s = 0; s < D; s++) if (ent_row[j][s] >= 0) expect1[ent_row[j][s]] ^= vec[j];

    repeat (2) @(posedge clk);
    rst_n <= 1'b1;

    // packets: last cell of each lane first, slots of a cell in order
    @(posedge clk); op <= OP_CLR_PKT;
    for (int q = CPL - 1; q >= 0; q--)
      for (int src = 0; src < P; src++)
        for (int s = 0; s < D; s++) begin
          @(posedge clk);
          if (rnd() % 4 == 0) begin op <= OP_IDLE; @(posedge clk); end
          op <= OP_LOAD_PKT;
          for (int l = 0; l < LANES; l++) pkt_in[l] <= make_slot(l*CPL + q, src, ent_row[(l*CPL + q)*P + src][s]);
        end
    @(posedge clk); op <= OP_CLR_VEC; pkt_in <= '0;

    // vectors: first cell of each lane first
    for (int q = 0; q < CPL; q++)
      for (int w = 0; w < P; w++) begin
        @(posedge clk);
        op <= OP_LOAD_VEC;
        if (rnd() % 3 == 0) begin vec_in_valid <= '0; @(posedge clk); end
        chk(!vec_done, "mesh not full before the last word");
        vec_in_valid <= '1;
        for (int l = 0; l < LANES; l++) vec_in[l] <= vec[(l*CPL + q)*P + w];
      end
    @(posedge clk); vec_in_valid <= '0;
    // the last words ripple through the earlier cells of their lane, one
    // cell per cycle
    steps = 0;
    do begin @(posedge clk); #1; steps++; end while (!vec_done && steps < 4*CPL);
    chk(vec_done, "mesh full after the last word has rippled through");
    chk(steps <= CPL, "vector ripple takes at most one cycle per cell");

    // routing
    worst = 0;
    for (int it = 0; it < P*D; it++) begin
      @(posedge clk); op <= OP_FETCH; fetch_idx <= FW'(it);
      steps = 0;
      @(posedge clk); #1;
      while (busy && steps < 8*M) begin
        n_prev = in_flight();
        op <= OP_STEP; phase <= phase_e'(steps % 4);
        @(posedge clk); #1;
        chk(in_flight() <= n_prev, "packets in flight never increase");
        steps++;
      end
      op <= OP_IDLE;

      chk(!busy, "routing iteration finishes within 8*M steps");
      if (steps > worst) worst = steps;
    end
    for (int w = 0; w < P; w++) begin
      @(posedge clk); op <= OP_COPY; copy_idx <= LW'(w);
    end
    @(posedge clk); op <= OP_CLR_UNLD;
    @(posedge clk); op <= OP_UNLOAD;

    // unload: last cell of a lane first, words 0..P-1 of each cell
    for (int t = 0; t < CPL*P; ) begin
      @(negedge clk);
      res_ready = (rnd() % 3 != 0) ? '1 : '0;
      if (res_valid[0] && res_ready[0]) begin
        for (int l = 0; l < LANES; l++) got[(l*CPL + CPL - 1 - t/P)*P + t%P] = res_data[l];
        t++;
      end
    end
    @(negedge clk);
    res_ready = '0;
    @(posedge clk); #1;
    chk(res_valid == '0, "nothing left after the last word");
    for (int i = 0; i < N; i++) chk(got[i] === expect1[i], $sformatf("result word %0d", i));
    $display("longest routing iteration: %0d steps", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
