// Test of one mesh cell with its neighbours, chains and controller played by
// the test bench.  Two cells of a 4 x 4 mesh (P = 2, D = 2, K = 8):
//   cell (1,2), inside the mesh: packet chain (stores only its own slots,
//     passes every slot on one cycle later), vector chain (keeps two words,
//     passes the third, reports full), fetch with delivery at fetch time,
//     the neighbour chosen in each of the four phases (odd row: down first;
//     even column: right first), delivery during a step, annihilation,
//     merge of equal destinations, exchange, fetch of an empty slot, copy
//     and unload of its two words followed by a word from upstream;
//   cell (3,3), the bottom-right corner: keeps its packet in a phase where
//     it has no partner, although the packet lies toward the lower
//     columns, and gives it away in the next phase, where it has one.
// Each operation takes one cycle; the checks look at the registers after
// the clock edge.
module tb_mr_cell
  import mr_pkg::*;
;
  localparam int unsigned M = 4, P = 2, D = 2, K = 8;
  localparam int unsigned CW = idx_w(M), LW = idx_w(P), FW = idx_w(P*D);
  localparam int unsigned PKT_W = 1 + 2*CW + LW + K, LPKT_W = 1 + 4*CW + 2*LW;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0, cycles = 0;
  always @(posedge clk) cycles++;

  mesh_op_e      op = OP_IDLE;
  phase_e        phase = PH_UP;
  logic [FW-1:0] fetch_idx = '0;
  logic [LW-1:0] copy_idx = '0;

  typedef struct packed {
    logic [PKT_W-1:0]  n, e, s, w;
    logic [LPKT_W-1:0] pkt_in;
    logic              vec_in_valid;
    logic [K-1:0]      vec_in;
    logic              unl_in_valid;
    logic [K-1:0]      unl_in;
    logic              unl_out_ready;
  } drive_t;
  typedef struct packed {
    logic [PKT_W-1:0]  cr_out;
    logic              busy;
    logic [LPKT_W-1:0] pkt_out;
    logic              vec_out_valid;
    logic [K-1:0]      vec_out;
    logic              vec_full;
    logic              unl_in_ready;
    logic              unl_out_valid;
    logic [K-1:0]      unl_out;
  } obs_t;

  drive_t dm = '0, dc = '0;  // inputs of the middle and corner cell
  obs_t   om, oc;

  mr_cell #(.M(M), .P(P), .D(D), .K(K), .ROW(1), .COL(2)) u_mid (
    .clk, .rst_n, .op, .phase, .fetch_idx, .copy_idx,
    .n_in(dm.n), .e_in(dm.e), .s_in(dm.s), .w_in(dm.w), .cr_out(om.cr_out), .busy(om.busy),
    .pkt_in(dm.pkt_in), .pkt_out(om.pkt_out),
    .vec_in_valid(dm.vec_in_valid), .vec_in(dm.vec_in), .vec_out_valid(om.vec_out_valid),
    .vec_out(om.vec_out), .vec_full(om.vec_full),
    .unl_in_valid(dm.unl_in_valid), .unl_in(dm.unl_in), .unl_in_ready(om.unl_in_ready),
    .unl_out_valid(om.unl_out_valid), .unl_out(om.unl_out), .unl_out_ready(dm.unl_out_ready));

  mr_cell #(.M(M), .P(P), .D(D), .K(K), .ROW(3), .COL(3)) u_corner (
    .clk, .rst_n, .op, .phase, .fetch_idx, .copy_idx,
    .n_in(dc.n), .e_in(dc.e), .s_in(dc.s), .w_in(dc.w), .cr_out(oc.cr_out), .busy(oc.busy),
    .pkt_in(dc.pkt_in), .pkt_out(oc.pkt_out),
    .vec_in_valid(dc.vec_in_valid), .vec_in(dc.vec_in), .vec_out_valid(oc.vec_out_valid),
    .vec_out(oc.vec_out), .vec_full(oc.vec_full),
    .unl_in_valid(dc.unl_in_valid), .unl_in(dc.unl_in), .unl_in_ready(oc.unl_in_ready),
    .unl_out_valid(oc.unl_out_valid), .unl_out(oc.unl_out), .unl_out_ready(dc.unl_out_ready));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  function automatic logic [PKT_W-1:0] pk(bit v, int r, int c, int lo, logic [K-1:0] vec);
    return {v, CW'(r), CW'(c), LW'(lo), vec};
  endfunction
  function automatic logic [LPKT_W-1:0] slot(int r, int c, int lo, int ri, int ci, int src);
    return {1'b1, CW'(r), CW'(c), LW'(lo), CW'(ri), CW'(ci), LW'(src)};
  endfunction

  // apply one operation for one clock cycle
  task automatic run(input mesh_op_e o);
    op = o;
    @(posedge clk);
    #1;
    op = OP_IDLE;
  endtask

  logic [K-1:0] v0 = 8'h3C, v1 = 8'hA5, v2 = 8'h5A, vc0 = 8'h81, vc1 = 8'h7E;
  logic [K-1:0] res [P];
  logic [K-1:0] pn, pe, ps, pw;

  initial begin
    for (int w = 0; w < P; w++) res[w] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---------------- packet chain
    run(OP_CLR_PKT);
    dm.pkt_in = slot(1, 2, 1, 1, 2, 0);   dc.pkt_in = slot(0, 0, 0, 3, 3, 0);
    run(OP_LOAD_PKT);
    chk(om.pkt_out == slot(1, 2, 1, 1, 2, 0), "packet chain passes a slot on");
    dm.pkt_in = slot(3, 0, 0, 1, 2, 1);   dc.pkt_in = '0;
    run(OP_LOAD_PKT);
    dm.pkt_in = slot(2, 2, 0, 0, 0, 1);   // belongs to another cell
    run(OP_IDLE);
    chk(om.pkt_out == slot(3, 0, 0, 1, 2, 1), "chain holds without a shift");
    run(OP_LOAD_PKT);
    dm.pkt_in = slot(0, 3, 0, 1, 2, 0);
    run(OP_LOAD_PKT);
    chk(om.pkt_out == slot(0, 3, 0, 1, 2, 0), "last slot passed on");
    chk(u_mid.u_load.wr_ptr == 3, "three own slots stored, foreign one skipped");
    dm.pkt_in = '0;

    // ---------------- vector chain
    run(OP_CLR_VEC);
    dm.vec_in_valid = 1; dm.vec_in = v0;  dc.vec_in_valid = 1; dc.vec_in = vc0;
    run(OP_LOAD_VEC);
    chk(!om.vec_full && !om.vec_out_valid, "first word kept");
    dm.vec_in = v1; dc.vec_in = vc1;
    run(OP_LOAD_VEC);
    chk(om.vec_full && oc.vec_full && !om.vec_out_valid, "full after P words");
    dm.vec_in = v2; dc.vec_in_valid = 0;
    run(OP_LOAD_VEC);
    chk(om.vec_out_valid && om.vec_out == v2, "later word passed on");
    dm.vec_in_valid = 0;
    run(OP_LOAD_VEC);
    chk(!om.vec_out_valid, "valid ripples with the word");

    // ---------------- fetch with delivery at fetch time
    fetch_idx = 0;
    run(OP_FETCH);
    chk(!om.busy, "own-destination packet delivered at fetch");
    res[1] ^= v0;
    chk(oc.cr_out == pk(1, 0, 0, 0, vc0), "corner fetched its packet");

    // ---------------- neighbour selection in each phase, delivery in a step
    for (int ph = 0; ph < 4; ph++) begin
      pn = K'(8'h11 * (ph + 1)); pe = pn ^ 8'h0F; ps = pn ^ 8'hF0; pw = ~pn;
      dm.n = pk(1, 1, 2, ph % 2, pn); dm.e = pk(1, 1, 2, ph % 2, pe);
      dm.s = pk(1, 1, 2, ph % 2, ps); dm.w = pk(1, 1, 2, ph % 2, pw);
      phase = phase_e'(ph);
      run(OP_STEP);
      chk(!om.busy, "packet for this cell delivered while routing");
      case (phase_e'(ph))
        PH_UP:    res[ph % 2] ^= ps;  // odd row: pairs downward first
        PH_RIGHT: res[ph % 2] ^= pe;  // even column: pairs right first
        PH_DOWN:  res[ph % 2] ^= pn;
        PH_LEFT:  res[ph % 2] ^= pw;
      endcase
      // corner (3,3): odd row pairs downward in the up phase and has no
      // partner there; odd column pairs to the left in the right phase
      if (phase_e'(ph) == PH_UP)
        chk(oc.cr_out == pk(1, 0, 0, 0, vc0), "corner keeps its packet without a partner");
      else if (phase_e'(ph) == PH_RIGHT)
        chk(!oc.busy, "corner hands its packet to the left neighbour");
    end
    dm = '0;

    // ---------------- annihilation: lone packet moves to the low neighbour
    fetch_idx = 1;
    run(OP_FETCH);
    chk(om.cr_out == pk(1, 3, 0, 0, v1), "fetch of slot 1");
    phase = PH_LEFT;                      // partner west, column 0 < 2
    run(OP_STEP);
    chk(!om.busy, "packet handed to the west neighbour");

    // ---------------- merge of equal destinations, then exchange
    fetch_idx = 2;
    run(OP_FETCH);
    chk(om.cr_out == pk(1, 0, 3, 0, v0), "fetch of slot 2");
    dm.s = pk(1, 0, 3, 0, 8'hC3);
    phase = PH_UP;
    run(OP_STEP);
    chk(om.cr_out == pk(1, 0, 3, 0, v0 ^ 8'hC3), "merge keeps the packet on the low side");
    dm.s = '0;
    dm.e = pk(1, 2, 0, 1, 8'h99);
    phase = PH_RIGHT;
    run(OP_STEP);
    chk(om.cr_out == pk(1, 2, 0, 1, 8'h99), "exchange with the east neighbour");
    dm.e = '0;
    fetch_idx = 3;
    run(OP_FETCH);
    chk(!om.busy, "empty slot fetches an empty packet");

    // ---------------- copy and unload
    for (int w = 0; w < P; w++) begin copy_idx = LW'(w); run(OP_COPY); end
    run(OP_CLR_UNLD);
    dm.unl_out_ready = 1;
    dm.unl_in_valid = 1; dm.unl_in = 8'hE7;
    for (int w = 0; w < P; w++) begin
      chk(!om.unl_in_ready, "upstream waits while own words leave");
      run(OP_UNLOAD);
      chk(om.unl_out_valid && om.unl_out == res[w], $sformatf("unloaded word %0d", w));
    end
    chk(om.unl_in_ready, "upstream taken after own words");
    run(OP_UNLOAD);
    chk(om.unl_out_valid && om.unl_out == 8'hE7, "upstream word passed on");
    dm.unl_in_valid = 0;
    run(OP_UNLOAD);
    chk(!om.unl_out_valid, "chain empty");
    chk(cycles < 60, "test length in cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
