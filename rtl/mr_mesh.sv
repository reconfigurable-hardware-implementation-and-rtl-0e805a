// The M x M mesh of routing cells.
//
// Cells are wired to their four neighbours (north, east, south, west); a
// missing neighbour at the mesh edge reads as an empty packet and is never
// selected.  Every cell receives the same operation, phase and indices from
// the controller, so all cells compare and exchange in lock step.
//
// Load and unload chains.  The rows are split into LANES groups of M/LANES
// consecutive rows.  In each group one chain runs through the cells in row
// major order: left to right along a row, from the right end of a row to the
// left end of the next.  Packets, vector words and results all use these
// chains; input enters the group's top-left cell and results leave its
// bottom-right cell.  LANES = 1 is the serial loading of the basic design,
// LANES = M loads every row in parallel, values between are the hybrid; the
// number of lanes is this design's parameter, the default of 1 is the
// document's basic approach.
//
// 'busy' is the OR of all cells' current packet status bits (routing of the
// current iteration is finished when it is low); 'vec_done' is the AND of
// all cells' vector-full flags.
module mr_mesh
  import mr_pkg::*;
#(
  parameter int unsigned M     = 12,
  parameter int unsigned P     = 16,
  parameter int unsigned D     = 1,
  parameter int unsigned K     = 50,
  parameter int unsigned LANES = 1,
  parameter bit          R1_STAGE = 1'b0,  // two-cycle compare-exchange cells
  localparam int unsigned CW     = idx_w(M),
  localparam int unsigned LW     = idx_w(P),
  localparam int unsigned FW     = idx_w(P*D),
  localparam int unsigned PKT_W  = 1 + 2*CW + LW + K,
  localparam int unsigned LPKT_W = 1 + 4*CW + 2*LW
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  mesh_op_e                     op,
  input  phase_e                       phase,
  input  logic [FW-1:0]                fetch_idx,
  input  logic [LW-1:0]                copy_idx,
  input  logic [LANES-1:0][LPKT_W-1:0] pkt_in,
  input  logic [LANES-1:0]             vec_in_valid,
  input  logic [LANES-1:0][K-1:0]      vec_in,
  output logic [LANES-1:0]             res_valid,
  output logic [LANES-1:0][K-1:0]      res_data,
  input  logic [LANES-1:0]             res_ready,
  output logic                         busy,
  output logic                         vec_done
);

  localparam int unsigned RPL = M / LANES;  // rows per lane
  localparam int unsigned N   = M * M;

  // per-cell signals, index = row * M + col
  logic [N-1:0][PKT_W-1:0]  cr;
  logic [N-1:0]             cell_busy;
  logic [N-1:0][LPKT_W-1:0] pkt_o;
  logic [N-1:0]             vec_o_valid;
  logic [N-1:0][K-1:0]      vec_o;
  logic [N-1:0]             vec_full;
  logic [N-1:0]             unl_i_ready;
  logic [N-1:0]             unl_o_valid;
  logic [N-1:0][K-1:0]      unl_o;

  for (genvar r = 0; r < M; r++) begin : g_row
    for (genvar c = 0; c < M; c++) begin : g_col
      localparam int unsigned I     = r * M + c;
      localparam bit          FIRST = ((r % RPL) == 0) && (c == 0);
      localparam bit          LAST  = ((r % RPL) == RPL - 1) && (c == M - 1);
      localparam int unsigned LANE  = r / RPL;

      logic [PKT_W-1:0]  n_i, e_i, s_i, w_i;
      logic [LPKT_W-1:0] pkt_i;
      logic              vec_i_valid;
      logic [K-1:0]      vec_i;
      logic              unl_i_valid;
      logic [K-1:0]      unl_i;
      logic              unl_o_ready;

      assign n_i = (r > 0)     ? cr[(r-1)*M + c] : '0;
      assign s_i = (r < M - 1) ? cr[(r+1)*M + c] : '0;
      assign w_i = (c > 0)     ? cr[r*M + c - 1] : '0;
      assign e_i = (c < M - 1) ? cr[r*M + c + 1] : '0;

      if (FIRST) begin : g_first
        assign pkt_i       = pkt_in[LANE];
        assign vec_i_valid = vec_in_valid[LANE];
        assign vec_i       = vec_in[LANE];
        assign unl_i_valid = 1'b0;
        assign unl_i       = '0;
      end else begin : g_chain
        assign pkt_i       = pkt_o[I-1];
        assign vec_i_valid = vec_o_valid[I-1];
        assign vec_i       = vec_o[I-1];
        assign unl_i_valid = unl_o_valid[I-1];
        assign unl_i       = unl_o[I-1];
      end

      if (LAST) begin : g_last
        assign unl_o_ready          = res_ready[LANE];
        assign res_valid[LANE]      = unl_o_valid[I];
        assign res_data[LANE]       = unl_o[I];
      end else begin : g_mid
        assign unl_o_ready = unl_i_ready[I+1];
      end

      mr_cell #(.M(M), .P(P), .D(D), .K(K), .ROW(r), .COL(c), .R1_STAGE(R1_STAGE)) u_cell (
        .clk          (clk),
        .rst_n        (rst_n),
        .op           (op),
        .phase        (phase),
        .fetch_idx    (fetch_idx),
        .copy_idx     (copy_idx),
        .n_in         (n_i),
        .e_in         (e_i),
        .s_in         (s_i),
        .w_in         (w_i),
        .cr_out       (cr[I]),
        .busy         (cell_busy[I]),
        .pkt_in       (pkt_i),
        .pkt_out      (pkt_o[I]),
        .vec_in_valid (vec_i_valid),
        .vec_in       (vec_i),
        .vec_out_valid(vec_o_valid[I]),
        .vec_out      (vec_o[I]),
        .vec_full     (vec_full[I]),
        .unl_in_valid (unl_i_valid),
        .unl_in       (unl_i),
        .unl_in_ready (unl_i_ready[I]),
        .unl_out_valid(unl_o_valid[I]),
        .unl_out      (unl_o[I]),
        .unl_out_ready(unl_o_ready)
      );
    end
  end

  assign busy     = |cell_busy;
  assign vec_done = &vec_full;

  initial begin
    assert (M % LANES == 0) else $error("LANES must divide M");
  end

endmodule
