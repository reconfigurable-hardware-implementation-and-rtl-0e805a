// Test of the loading unit in a chain of three cells (0,0), (0,1), (0,2).
//  - packet chain: random slots with random loading addresses (some for
//    cells outside the chain, some empty) are shifted in with stalls; each
//    stage must pass the packet on one shift later, and each cell must store,
//    in arrival order, exactly the packets addressed to it that reached it;
//  - vector chain: 3*P + 1 words with random gaps; cell u must keep words
//    u*P .. u*P+P-1, the extra word must leave the last cell;
//  - fetch: every store entry with its selected vector word, and the valid
//    flag above the fill level;
//  - copy: new words written into P of the middle cell;
//  - unload: with random back-pressure the chain must deliver the last
//    cell's words first, then the middle, then the first cell's.
module tb_mr_loading_unit;
  localparam int unsigned P = 2, D = 2, K = 6, CW = 2, LW = 1;
  localparam int unsigned LPKT_W = 1 + 4*CW + 2*LW;
  localparam int unsigned NC = 3, DEPTH = P * D, NPKT = 30;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic              pkt_clr = 0, pkt_shift = 0, vec_clr = 0, vec_en = 0, copy_en = 0;
  logic              unload_clr = 0, unload_en = 0, out_ready = 0;
  logic [LPKT_W-1:0] pkt_chain [NC+1];
  logic              vv [NC+1];
  logic [K-1:0]      vd [NC+1];
  logic              uv [NC+1], ur [NC+1];
  logic [K-1:0]      ud [NC+1];
  logic              vfull [NC];
  logic [1:0]        fetch_idx = 0;
  logic              f_valid [NC];
  logic [CW-1:0]     f_row [NC], f_col [NC];
  logic [LW-1:0]     f_lo [NC];
  logic [K-1:0]      f_vec [NC];
  logic [LW-1:0]     copy_addr = 0;
  logic [K-1:0]      copy_data = 0;
  logic              copy_sel [NC];

  assign uv[0] = 1'b0;
  assign ud[0] = '0;
  assign ur[NC] = out_ready;

  for (genvar u = 0; u < NC; u++) begin : g_u
    logic vs; logic [LW-1:0] va;
    mr_loading_unit #(.P(P), .D(D), .K(K), .CW(CW), .LW(LW), .LPKT_W(LPKT_W)) dut (
      .clk(clk), .rst_n(rst_n), .own_row(CW'(0)), .own_col(CW'(u)),
      .pkt_clr(pkt_clr), .pkt_shift(pkt_shift), .pkt_in(pkt_chain[u]), .pkt_out(pkt_chain[u+1]),
      .vec_clr(vec_clr), .vec_en(vec_en), .vec_in_valid(vv[u]), .vec_in(vd[u]),
      .vec_out_valid(vv[u+1]), .vec_out(vd[u+1]), .vec_full(vfull[u]), .vec_store(vs), .vec_addr(va),
      .fetch_idx(fetch_idx), .fetch_valid(f_valid[u]), .fetch_row(f_row[u]), .fetch_col(f_col[u]),
      .fetch_lo(f_lo[u]), .fetch_vec(f_vec[u]),
      .copy_en(copy_en && copy_sel[u]), .copy_addr(copy_addr), .copy_data(copy_data),
      .unload_clr(unload_clr), .unload_en(unload_en),
      .unl_in_valid(uv[u]), .unl_in(ud[u]), .unl_in_ready(ur[u]),
      .unl_out_valid(uv[u+1]), .unl_out(ud[u+1]), .unl_out_ready(ur[u+1]));
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  logic [LPKT_W-1:0] pk [NPKT];
  logic [K-1:0]      words [NC*P+1];
  logic [K-1:0]      pword [NC][P];
  int                exp_n [NC];
  logic [LPKT_W-1:0] exp_e [NC][DEPTH];

  initial begin
    pkt_chain[0] = '0; vv[0] = 0; vd[0] = '0;
    for (int u = 0; u < NC; u++) copy_sel[u] = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // ---------------- vectors
    @(negedge clk); vec_clr = 1; @(negedge clk); vec_clr = 0; vec_en = 1;
    for (int w = 0; w < NC*P+1; w++) begin
      words[w] = K'($urandom);
      while ($urandom % 3 == 0) begin vv[0] = 0; @(negedge clk); end
      vv[0] = 1; vd[0] = words[w];
      @(negedge clk);
      if (w == NC*P) begin
        vv[0] = 0;
        repeat (NC) begin
          @(negedge clk);
          if (vv[NC]) chk(vd[NC] == words[NC*P], "extra vector word leaves the chain");
        end
      end
    end
    vv[0] = 0; vec_en = 0;
    for (int u = 0; u < NC; u++) begin
      chk(vfull[u], "vector store full");
      for (int w = 0; w < P; w++) pword[u][w] = words[u*P + w];
    end

    // ---------------- packets
    for (int u = 0; u < NC; u++) exp_n[u] = 0;
    for (int k = 0; k < NPKT; k++) begin
      automatic logic [CW-1:0] ci = CW'($urandom % 4);
      pk[k] = {1'($urandom % 4 != 0), CW'($urandom), CW'($urandom), LW'($urandom),
               CW'(($urandom % 5 == 0) ? 1 : 0), ci, LW'($urandom)};
    end
    @(negedge clk); pkt_clr = 1; @(negedge clk); pkt_clr = 0;
    for (int k = 0; k < NPKT; k++) begin
      while ($urandom % 4 == 0) begin pkt_shift = 0; @(negedge clk); end
      pkt_shift = 1; pkt_chain[0] = pk[k];
      // the packets now at the inputs of the stages
      for (int u = 0; u < NC; u++) begin
        if (k - u >= 0) begin
          automatic logic [LPKT_W-1:0] q = pk[k-u];
          chk(pkt_chain[u] == q, "packet chain stage content");
          // st, ri == 0, ci == u
          if (q[LPKT_W-1] && q[LW+2*CW-1 -: CW] == 0 && q[LW+CW-1 -: CW] == CW'(u) && exp_n[u] < DEPTH) begin
            exp_e[u][exp_n[u]] = q;
            exp_n[u]++;
          end
        end
      end
      @(negedge clk);
    end
    pkt_shift = 0;

    // ---------------- fetch
    for (int u = 0; u < NC; u++)
      for (int i = 0; i < DEPTH; i++) begin
        fetch_idx = 2'(i); #1;
        chk(f_valid[u] == (i < exp_n[u]), "fetch valid");
        if (i < exp_n[u]) begin
          automatic logic [LPKT_W-1:0] e = exp_e[u][i];
          chk({f_row[u], f_col[u], f_lo[u]} == e[LPKT_W-2 -: 2*CW+LW], "fetch routing address");
          chk(f_vec[u] == pword[u][e[LW-1:0]], "fetch vector word");
        end
      end

    // ---------------- copy into the middle cell
    copy_sel[1] = 1'b1; copy_en = 1;
    for (int w = 0; w < P; w++) begin
      copy_addr = LW'(w); copy_data = K'($urandom); pword[1][w] = copy_data;
      @(negedge clk);
    end
    copy_en = 0; copy_sel[1] = 1'b0;

    // ---------------- unload
    unload_clr = 1; @(negedge clk); unload_clr = 0; unload_en = 1;
    begin
      automatic int n = 0;
      automatic int guard = 0;
      while (n < NC*P && guard < 500) begin
        out_ready = ($urandom % 3 != 0);
        #1;
        if (uv[NC] && out_ready) begin
          automatic int u = NC - 1 - n / P;
          chk(ud[NC] == pword[u][n % P], "unload order and data");
          n++;
        end
        @(negedge clk); guard++;
      end
      chk(n == NC*P, "all words unloaded");
    end
    unload_en = 0;
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
