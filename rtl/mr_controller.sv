// Control unit of the routing mesh.
//
// Accepts one host command at a time and broadcasts the matching operation
// (mesh_op_e) to every cell each cycle:
//
//   CMD_LOAD_PKT  OP_CLR_PKT for one cycle, then OP_LOAD_PKT on every cycle
//                 the host offers a packet slot (in_valid); the chains stall
//                 when it does not.  After D*P*M*M/LANES slots per lane the
//                 command ends.  Slots must be sent for the last cell of the
//                 lane first, so every packet has reached its cell by then.
//   CMD_LOAD_VEC  OP_CLR_VEC, then OP_LOAD_VEC until P*M*M/LANES words per
//                 lane were taken and every cell reports its P words.
//   CMD_MULTIPLY  P*D routing iterations.  An iteration is one OP_FETCH
//                 cycle (each cell moves entry R[iter] with its vector bits
//                 into its current packet register) followed by OP_STEP
//                 cycles, one compare-exchange phase each, in the order up,
//                 right, down, left, repeated.  The iteration ends as soon as
//                 no cell holds a valid packet, or after MAX_PHASES steps;
//                 in the latter case undelivered packets are dropped and the
//                 flag 'route_overrun' is set (it holds until the next
//                 CMD_MULTIPLY).  Then P OP_COPY cycles
//                 move P' into P and clear P'.
//   CMD_UNLOAD    OP_CLR_UNLD, then OP_UNLOAD until P*M*M/LANES results
//                 per lane left the mesh (res_fire counts lane 0).
//
// With X = 2 each compare-exchange takes two cycles, OP_SELECT (the cells
// register their partner's packet in R1) and then OP_STEP, as in the cell
// pipelined for a 10 ns platform clock; X = 1 is the stand-alone design.
//
// 'done' pulses for one cycle when a command ends; 'cmd_ready' is high when
// idle.  The command set, the stall on in_valid, the early end of an
// iteration and the overrun flag are this design's choices; the sequence of
// the multiplication (load, clear P', route P*D times, copy P' to P, unload)
// and MAX_PHASES = 4*M follow the document.
module mr_controller
  import mr_pkg::*;
#(
  parameter int unsigned M          = 12,
  parameter int unsigned P          = 16,
  parameter int unsigned D          = 1,
  parameter int unsigned LANES      = 1,
  parameter int unsigned MAX_PHASES = 4 * M,
  parameter int unsigned X          = 1,      // cycles per compare-exchange (1 or 2)
  localparam int unsigned LW = idx_w(P),
  localparam int unsigned FW = idx_w(P*D)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cmd_valid,
  input  mesh_cmd_e     cmd,
  output logic          cmd_ready,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic          res_fire,
  input  logic          mesh_busy,
  input  logic          vec_done,
  output mesh_op_e      op,
  output phase_e        phase,
  output logic [FW-1:0] fetch_idx,
  output logic [LW-1:0] copy_idx,
  output logic          unloading,
  output logic          done,
  output logic          route_overrun
);

  localparam int unsigned CELLS_PER_LANE = M * M / LANES;
  localparam int unsigned PKT_SLOTS      = D * P * CELLS_PER_LANE;
  localparam int unsigned VEC_WORDS      = P * CELLS_PER_LANE;
  localparam int unsigned ITERS          = P * D;

  typedef enum logic [3:0] {
    S_IDLE, S_CLR_PKT, S_LOAD_PKT, S_CLR_VEC, S_LOAD_VEC,
    S_ROUTE, S_COPY, S_CLR_UNLD, S_UNLOAD
  } state_e;

  state_e      state;
  int unsigned cnt;      // beats, iterations or copy words of the command
  int unsigned phcnt;    // steps in the current routing iteration
  logic        first;    // first cycle of a routing run: fetch at once
  logic        iter_end;
  logic        sel_done; // R1 holds the partner packet of this phase

  assign cmd_ready = (state == S_IDLE);
  assign in_ready  = (state == S_LOAD_PKT) ||
                     ((state == S_LOAD_VEC) && (cnt < VEC_WORDS));
  assign unloading = (state == S_UNLOAD);
  assign iter_end  = first || !mesh_busy || (phcnt >= MAX_PHASES);
  assign fetch_idx = FW'(cnt);
  assign copy_idx  = LW'(cnt);

  always_comb begin
    op = OP_IDLE;
    unique case (state)
      S_CLR_PKT:  op = OP_CLR_PKT;
      S_LOAD_PKT: op = in_valid ? OP_LOAD_PKT : OP_IDLE;
      S_CLR_VEC:  op = OP_CLR_VEC;
      S_LOAD_VEC: op = OP_LOAD_VEC;
      S_ROUTE:    op = !iter_end ? (((X > 1) && !sel_done) ? OP_SELECT : OP_STEP)
                                 : (cnt < ITERS) ? OP_FETCH : OP_IDLE;
      S_COPY:     op = OP_COPY;
      S_CLR_UNLD: op = OP_CLR_UNLD;
      S_UNLOAD:   op = OP_UNLOAD;
      default:    op = OP_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      cnt           <= 0;
      phcnt         <= 0;
      first         <= 1'b0;
      sel_done      <= 1'b0;
      phase         <= PH_UP;
      done          <= 1'b0;
      route_overrun <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          cnt <= 0;
          unique case (cmd)
            CMD_LOAD_PKT: state <= S_CLR_PKT;
            CMD_LOAD_VEC: state <= S_CLR_VEC;
            CMD_MULTIPLY: begin state <= S_ROUTE; first <= 1'b1; route_overrun <= 1'b0; end
            CMD_UNLOAD:   state <= S_CLR_UNLD;
            default:      state <= S_IDLE;
          endcase
        end
        S_CLR_PKT: state <= S_LOAD_PKT;
        S_LOAD_PKT: if (in_valid) begin
          cnt <= cnt + 1;
          if (cnt == PKT_SLOTS - 1) begin state <= S_IDLE; done <= 1'b1; end
        end
        S_CLR_VEC: state <= S_LOAD_VEC;
        S_LOAD_VEC: begin
          if (in_valid && in_ready) cnt <= cnt + 1;
          if (cnt == VEC_WORDS && vec_done) begin state <= S_IDLE; done <= 1'b1; end
        end
        S_ROUTE: begin
          first <= 1'b0;
          if (iter_end) begin
            if (!first && mesh_busy) route_overrun <= 1'b1;
            phcnt <= 0;
            phase <= PH_UP;
            if (cnt < ITERS) cnt <= cnt + 1;
            else begin state <= S_COPY; cnt <= 0; end
          end else if ((X > 1) && !sel_done) begin
            sel_done <= 1'b1;
          end else begin
            sel_done <= 1'b0;
            phcnt    <= phcnt + 1;
            phase    <= phase_e'(phase + 2'd1);
          end
        end
        S_COPY: begin
          cnt <= cnt + 1;
          if (cnt == P - 1) begin state <= S_IDLE; done <= 1'b1; end
        end
        S_CLR_UNLD: state <= S_UNLOAD;
        S_UNLOAD: if (res_fire) begin
          cnt <= cnt + 1;
          if (cnt == VEC_WORDS - 1) begin state <= S_IDLE; done <= 1'b1; end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
