// Reusable end-to-end test of mesh_routing_top for one configuration.
//
// Builds a random sparse matrix A (N x N, N = M*M*P, each column with up to
// D non-zero entries at random rows) and K random vectors v, loads them into
// the mesh through the host interface with random stalls on in_valid, runs
// CMD_MULTIPLY, unloads with random back-pressure on res_ready and compares
// every result word with A*v worked out here from the entry list.  It then
// multiplies again without reloading (the mesh keeps its result in P) and
// compares with A*(A*v).  It also checks the cycle budget of a
// multiplication (P*D iterations of one fetch plus at most 4*M
// compare-exchange cycles, plus P copy cycles) and counts how often each
// mechanism occurred: input stalls, output back-pressure, exchanges,
// annihilations, merges of equal-destination packets and deliveries at fetch
// time.  MAXPH is the design's limit on compare-exchange steps per routing
// iteration; the document's 4*M holds for 12 x 12 meshes, small test meshes
// need more headroom.  With FULL = 1 the top is instantiated with its default parameters,
// which then must equal this harness's parameters.
module tb_mr_harness
  import mr_pkg::*;
#(
  parameter int unsigned M     = 4,
  parameter int unsigned P     = 4,
  parameter int unsigned D     = 2,
  parameter int unsigned K     = 8,
  parameter int unsigned LANES = 1,
  parameter int unsigned SEED  = 1,
  parameter bit          FULL  = 1'b0,
  parameter int unsigned DENS  = 75,   // percent of slots that hold an entry
  parameter int unsigned MAXPH = 4 * M, // routing step limit of the design
  parameter int unsigned X     = 1      // cycles per compare-exchange
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        finished,
  output int unsigned checks,
  output int unsigned failures
);

  localparam int unsigned CW     = idx_w(M);
  localparam int unsigned LW     = idx_w(P);
  localparam int unsigned LPKT_W = 1 + 4*CW + 2*LW;
  localparam int unsigned N      = M * M * P;
  localparam int unsigned CPL    = M * M / LANES;

  logic                         cmd_valid, cmd_ready, in_valid, in_ready;
  mesh_cmd_e                    cmd;
  logic [LANES-1:0][LPKT_W-1:0] pkt_in;
  logic [LANES-1:0][K-1:0]      vec_in;
  logic [LANES-1:0]             res_valid;
  logic [LANES-1:0][K-1:0]      res_data;
  logic                         res_ready, done, route_overrun;

  mesh_op_e obs_op;  // operation the controller broadcasts

  if (FULL) begin : g_full
    mesh_routing_top dut (.*);
    assign obs_op = dut.op;
  end else begin : g_param
    mesh_routing_top #(.M(M), .P(P), .D(D), .K(K), .LANES(LANES), .MAX_PHASES(MAXPH), .X(X)) dut (.*);
    assign obs_op = dut.op;
  end

  // ---------------------------------------------------------------- model
  int           ent_row [N][D];   // -1: no entry
  logic [K-1:0] vec     [N];
  logic [K-1:0] expect1 [N];
  logic [K-1:0] expect2 [N];
  logic [K-1:0] got     [N];

  // xorshift32 generator, one per harness, so configurations do not share
  // a random stream
  logic [31:0] rs;
  function automatic int unsigned rnd();
    rs = rs ^ (rs << 13);
    rs = rs ^ (rs >> 17);
    rs = rs ^ (rs << 5);
    return rs;
  endfunction

  task automatic build_matrix();
    for (int j = 0; j < N; j++)
      for (int s = 0; s < D; s++)
        ent_row[j][s] = ((rnd() % 100) < DENS) ? int'(rnd() % N) : -1;
    // one entry whose row lies in the cell that holds its column, so that a
    // packet is delivered at fetch time
    ent_row[0][0] = 0;
    for (int j = 0; j < N; j++)
      for (int b = 0; b < K; b++) vec[j][b] = 1'(rnd());
  endtask

  task automatic multiply_ref(input logic [K-1:0] x [N], output logic [K-1:0] y [N]);
    for (int i = 0; i < N; i++) y[i] = '0;
    for (int j = 0; j < N; j++)
      for (int s = 0; s < D; s++)
        if (ent_row[j][s] >= 0) y[ent_row[j][s]] ^= x[j];
  endtask

  function automatic logic [LPKT_W-1:0] make_slot(int cidx, int src, int row);
    logic [LPKT_W-1:0] w;
    int dcell;
    if (row < 0) return '0;
    dcell = row / int'(P);
    w = {1'b1, CW'(dcell / int'(M)), CW'(dcell % int'(M)), LW'(row % int'(P)),
         CW'(cidx / int'(M)), CW'(cidx % int'(M)), LW'(src)};
    return w;
  endfunction

  // ---------------------------------------------------------------- driving
  int unsigned stalls_in, stalls_out;

  task automatic send_cmd(input mesh_cmd_e c);
    cmd       <= c;
    cmd_valid <= 1'b1;
    do @(posedge clk); while (!cmd_ready);
    cmd_valid <= 1'b0;
  endtask

  task automatic wait_done();
    do @(posedge clk); while (!done);
  endtask

  task automatic load_packets();
    send_cmd(CMD_LOAD_PKT);
    for (int q = CPL - 1; q >= 0; q--)
      for (int src = 0; src < P; src++)
        for (int s = 0; s < D; s++) begin
          while ((rnd() % 8) == 0) begin
            in_valid <= 1'b0; stalls_in++;
            @(posedge clk);
          end
          for (int l = 0; l < LANES; l++) begin
            int cidx = l * CPL + q;
            pkt_in[l] <= make_slot(cidx, src, ent_row[cidx*P + src][s]);
          end
          in_valid <= 1'b1;
          do @(posedge clk); while (!in_ready);
        end
    in_valid <= 1'b0;
    pkt_in   <= '0;
    wait_done();
  endtask

  task automatic load_vectors();
    int unsigned sent = 0;
    send_cmd(CMD_LOAD_VEC);
    for (int q = 0; q < CPL; q++)
      for (int w = 0; w < P; w++) begin
        while ((rnd() % 8) == 0) begin
          in_valid <= 1'b0; stalls_in++;
          @(posedge clk);
        end
        for (int l = 0; l < LANES; l++) vec_in[l] <= vec[(l*CPL + q)*P + w];
        in_valid <= 1'b1;
        do @(posedge clk); while (!in_ready);
        sent++;
      end
    in_valid <= 1'b0;
    wait_done();
  endtask

  task automatic unload(output logic [K-1:0] y [N]);
    int unsigned taken = 0;
    send_cmd(CMD_UNLOAD);
    while (taken < CPL * P) begin
      res_ready <= ((rnd() % 4) != 0);
      @(posedge clk);
      if (res_valid[0] && res_ready) begin
        int q = CPL - 1 - int'(taken / P);
        int w = int'(taken % P);
        for (int l = 0; l < LANES; l++) y[(l*CPL + q)*P + w] = res_data[l];
        taken++;
      end else if (res_valid[0]) stalls_out++;
    end
    res_ready <= 1'b0;
    wait_done();
  endtask

  task automatic compare(input logic [K-1:0] a [N], input logic [K-1:0] b [N], input string what);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (a[i] !== b[i]) begin
        failures++;
        if (failures < 10) $display("MISMATCH %s index %0d: got %h expected %h", what, i, a[i], b[i]);
      end
    end
  endtask

  // ---------------------------------------------------------------- events
  int unsigned n_exch, n_annih, n_merge, n_fetch_deliver, n_step_deliver;
  int unsigned mult_cycles, max_iter_steps, iter_steps, n_select, n_step;

  for (genvar r = 0; r < M; r++) begin : g_mr
    for (genvar c = 0; c < M; c++) begin : g_mc
      if (FULL) begin : g_f
        always @(posedge clk) if (rst_n) begin
          if (g_full.dut.u_mesh.op == OP_STEP) begin
            if (g_full.dut.u_mesh.g_row[r].g_col[c].u_cell.exchange)   n_exch++;
            if (g_full.dut.u_mesh.g_row[r].g_col[c].u_cell.annihilate) n_annih++;
            if (g_full.dut.u_mesh.g_row[r].g_col[c].u_cell.eq_packet)  n_merge++;
            if (g_full.dut.u_mesh.g_row[r].g_col[c].u_cell.deliver)    n_step_deliver++;
          end
          if (g_full.dut.u_mesh.op == OP_FETCH && g_full.dut.u_mesh.g_row[r].g_col[c].u_cell.deliver)
            n_fetch_deliver++;
        end
      end else begin : g_p
        always @(posedge clk) if (rst_n) begin
          if (g_param.dut.u_mesh.op == OP_STEP) begin
            if (g_param.dut.u_mesh.g_row[r].g_col[c].u_cell.exchange)   n_exch++;
            if (g_param.dut.u_mesh.g_row[r].g_col[c].u_cell.annihilate) n_annih++;
            if (g_param.dut.u_mesh.g_row[r].g_col[c].u_cell.eq_packet)  n_merge++;
            if (g_param.dut.u_mesh.g_row[r].g_col[c].u_cell.deliver)    n_step_deliver++;
          end
          if (g_param.dut.u_mesh.op == OP_FETCH && g_param.dut.u_mesh.g_row[r].g_col[c].u_cell.deliver)
            n_fetch_deliver++;
        end
      end
    end
  end

  task automatic multiply();
    int unsigned t0;
    send_cmd(CMD_MULTIPLY);
    t0 = 0; iter_steps = 0;
    forever begin
      @(posedge clk);
      t0++;
      if (obs_op == OP_STEP) begin iter_steps++; n_step++; end
      if (obs_op == OP_SELECT) n_select++;
      if (obs_op == OP_FETCH || done) begin
        if (iter_steps > max_iter_steps) max_iter_steps = iter_steps;
        iter_steps = 0;
      end
      if (done) break;
    end
    mult_cycles = t0;
    checks++;
    if (route_overrun) begin
      failures++;
      $display("FAIL: a routing iteration needed more than %0d compare-exchange steps", MAXPH);
    end
    checks++;
    // P*D iterations of (1 fetch + <= MAXPH steps), one closing cycle, P copies
    if (mult_cycles > P*D*(1 + X*MAXPH) + 1 + P + 1) begin
      failures++;
      $display("FAIL: multiplication took %0d cycles, budget %0d", mult_cycles, P*D*(1+X*MAXPH)+P+2);
    end
  endtask

  initial begin
    finished = 1'b0; checks = 0; failures = 0;
    stalls_in = 0; stalls_out = 0;
    n_exch = 0; n_annih = 0; n_merge = 0; n_fetch_deliver = 0; n_step_deliver = 0;
    max_iter_steps = 0; n_select = 0; n_step = 0;
    cmd_valid = 1'b0; cmd = CMD_LOAD_PKT; in_valid = 1'b0; pkt_in = '0; vec_in = '0; res_ready = 1'b0;
    rs = 32'h9E37_79B9 ^ SEED;
    build_matrix();
    multiply_ref(vec, expect1);
    multiply_ref(expect1, expect2);
    @(posedge clk iff rst_n);
    load_packets();
    load_vectors();
    multiply();
    $display("[M=%0d P=%0d D=%0d K=%0d LANES=%0d] multiply: %0d cycles, longest iteration %0d steps (4*M = %0d)",
             M, P, D, K, LANES, mult_cycles, max_iter_steps, 4*M);
    unload(got);
    compare(got, expect1, "A*v");
    multiply();
    unload(got);
    compare(got, expect2, "A*A*v");
    $display("[M=%0d P=%0d] events: in-stalls %0d out-stalls %0d exchanges %0d annihilations %0d merges %0d fetch-deliveries %0d step-deliveries %0d",
             M, P, stalls_in, stalls_out, n_exch, n_annih, n_merge, n_fetch_deliver, n_step_deliver);
    checks++; if (stalls_in == 0)       begin failures++; $display("FAIL: no input stall"); end
    checks++; if (stalls_out == 0)      begin failures++; $display("FAIL: no output back-pressure"); end
    checks++; if (n_exch == 0)          begin failures++; $display("FAIL: no exchange"); end
    checks++; if (n_annih == 0)         begin failures++; $display("FAIL: no annihilation"); end
    checks++; if (n_merge == 0)         begin failures++; $display("FAIL: no equal-destination merge"); end
    checks++; if (n_fetch_deliver == 0) begin failures++; $display("FAIL: no delivery at fetch"); end
    checks++; if (n_step_deliver == 0)  begin failures++; $display("FAIL: no delivery while routing"); end
    // every compare-exchange of the two-cycle variant is preceded by a
    // select cycle; the one-cycle design never selects
    checks++;
    if (n_select != ((X > 1) ? n_step : 0)) begin
      failures++;
      $display("FAIL: %0d select cycles for %0d compare-exchanges with X = %0d", n_select, n_step, X);
    end
    finished = 1'b1;
  end

endmodule
