// Test of the control unit with a behavioural stand-in for the mesh.
// Checks for each command the operation sequence it broadcasts:
//   load packets: one OP_CLR_PKT, then OP_LOAD_PKT exactly on the cycles the
//     host offers a slot, done after D*P*M*M slots;
//   load vectors: OP_CLR_VEC, OP_LOAD_VEC, in_ready drops after P*M*M words,
//     done only once the mesh reports all cells full;
//   multiply: P*D fetches with indices 0, 1, ...; after each fetch the
//     phases up, right, down, left, ... for as long as the stand-in mesh
//     says it is busy; then P copies with indices 0..P-1; cycle count;
//   multiply with a mesh that never finishes: MAX_PHASES steps per
//     iteration and route_overrun set;
//   unload: OP_CLR_UNLD, then OP_UNLOAD until P*M*M results were taken.
module tb_mr_controller
  import mr_pkg::*;
;
  localparam int unsigned M = 2, P = 2, D = 2, LANES = 1, MAXPH = 5;
  localparam int unsigned SLOTS = D*P*M*M, WORDS = P*M*M, ITERS = P*D;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic      cmd_valid = 0, cmd_ready, in_valid = 0, in_ready, res_fire = 0;
  logic      mesh_busy, vec_done = 0, unloading, done, route_overrun;
  mesh_cmd_e cmd = CMD_LOAD_PKT;
  mesh_op_e  op;
  phase_e    phase;
  logic [1:0] fetch_idx;
  logic [0:0] copy_idx;

  mr_controller #(.M(M), .P(P), .D(D), .LANES(LANES), .MAX_PHASES(MAXPH)) dut (.*);

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
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s (op %s)", what, op.name()); end
  endtask

  task automatic issue(input mesh_cmd_e c);
    @(negedge clk);
    chk(cmd_ready, "ready when idle");
    cmd = c; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  // stand-in mesh: busy for a set number of steps after every fetch
  int unsigned busy_left = 0;
  bit          stuck = 0;
  always @(posedge clk) begin
    if (op == OP_FETCH) busy_left <= 1 + (rnd() % 4);
    else if (op == OP_STEP && busy_left > 0) busy_left <= busy_left - 1;
  end
  assign mesh_busy = stuck || (busy_left > 0);

  initial begin
    int unsigned n, cyc, iters, steps;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---------------- load packets
    issue(CMD_LOAD_PKT);
    chk(op == OP_CLR_PKT, "clear before packet load");
    n = 0;
    while (!done) begin
      @(negedge clk);
      in_valid = (rnd() % 3 != 0);
      #1;
      if (!done) begin
        chk(op == (in_valid ? OP_LOAD_PKT : OP_IDLE), "packet shift only on offered slots");
        chk(in_ready, "in_ready while loading packets");
        if (in_valid) n++;
      end
    end
    in_valid = 0;
    chk(n == SLOTS, "number of packet slots");

    // ---------------- load vectors
    issue(CMD_LOAD_VEC);
    chk(op == OP_CLR_VEC, "clear before vector load");
    n = 0;
    for (int c = 0; c < 40 && !done; c++) begin
      @(negedge clk);
      in_valid = 1;
      vec_done = (n == WORDS) && (c > 30);
      #1;
      if (!done) begin
        chk(op == OP_LOAD_VEC, "vector chain active");
        if (in_ready) n++;
      end
    end
    in_valid = 0;
    @(negedge clk);
    chk(n == WORDS, "number of vector words");
    chk(cmd_ready, "vector load ends after the mesh is full");
    vec_done = 0;

    // ---------------- multiply
    issue(CMD_MULTIPLY);
    iters = 0; steps = 0; cyc = 1;
    while (op != OP_COPY) begin
      if (op == OP_FETCH) begin
        chk(fetch_idx == 2'(iters), "fetch index sequence");
        iters++; steps = 0;
      end else if (op == OP_STEP) begin
        chk(phase == phase_e'(steps % 4), "phase order up, right, down, left");
        steps++;
      end
      @(negedge clk); cyc++;
      if (cyc > 200) break;
    end
    chk(iters == ITERS, "P*D routing iterations");
    for (int w = 0; w < P; w++) begin
      chk(op == OP_COPY && copy_idx == 1'(w), "copy sequence");
      @(negedge clk);
    end
    chk(cmd_ready && !route_overrun, "multiply finished without overrun");

    // ---------------- multiply with a mesh that never empties
    stuck = 1;
    issue(CMD_MULTIPLY);
    iters = 0; steps = 0; cyc = 0;
    while (op != OP_COPY && cyc < 200) begin
      if (op == OP_FETCH) begin
        if (iters > 0) chk(steps == MAXPH, "step limit per iteration");
        iters++; steps = 0;
      end else if (op == OP_STEP) steps++;
      @(negedge clk); cyc++;
    end
    chk(iters == ITERS && steps == MAXPH, "iterations under overrun");
    stuck = 0;
    repeat (P + 1) @(negedge clk);
    chk(route_overrun, "overrun flagged");

    // ---------------- unload
    issue(CMD_UNLOAD);
    chk(op == OP_CLR_UNLD, "unload start");
    n = 0;
    while (!done && n < 100) begin
      @(negedge clk);
      #1;
      chk(op == OP_UNLOAD && unloading, "unloading");
      res_fire = (rnd() % 2 == 0);
      n += res_fire;
      @(posedge clk); #1;
      res_fire = 0;
    end
    chk(n == WORDS, "number of results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
