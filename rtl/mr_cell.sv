// One cell of the routing mesh.
//
// A cell owns P consecutive columns of the sub-matrix (their non-zero
// entries, as packets, in R[i], and their K vector bits in P[i]) and the same
// P row indices of the result (P'[i]).  P = 1 gives the basic design, in
// which a cell handles one column; P = 16 is the improved design.
//
// Status bits.  The cell's row and column (ROW, COL) are parameters, so the
// document's per-cell status bits are constants: odd/even row and column,
// the four edge flags, 'top_start' (the cell pairs upward in phase 1) and
// 'clockwise' (row + column even; the cell meets its neighbours top, right,
// bottom, left in that order, otherwise top, left, bottom, right).
//
// Routing.  In each compare-exchange phase the cell selects one neighbour's
// packet as the 'new packet' (or none at a mesh edge), compares rows in
// vertical phases and columns in horizontal ones ('row_col'), and is the
// greater-than ('oper' = 1) side when the neighbour lies below or to its
// right.  Its own current packet CR is sent to all four neighbours.
//
// Control unit (CU).  The global operation 'op' from the mesh controller is
// decoded here into the enables of the loading, current packet and result
// units; see mr_pkg for the operations.  One compare-exchange takes one clock
// cycle, as in the stand-alone FPGA design.  With R1_STAGE = 1 the selected
// partner packet goes through register R1 first (OP_SELECT, then OP_STEP),
// as in the cell the document pipelines for a 10 ns platform clock.
module mr_cell
  import mr_pkg::*;
#(
  parameter int unsigned M   = 12,
  parameter int unsigned P   = 16,
  parameter int unsigned D   = 1,
  parameter int unsigned K   = 50,
  parameter int unsigned ROW = 0,
  parameter int unsigned COL = 0,
  parameter bit          R1_STAGE = 1'b0,  // register R1 before the comparator
  localparam int unsigned CW     = idx_w(M),
  localparam int unsigned LW     = idx_w(P),
  localparam int unsigned FW     = idx_w(P*D),
  localparam int unsigned PKT_W  = 1 + 2*CW + LW + K,
  localparam int unsigned LPKT_W = 1 + 4*CW + 2*LW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mesh_op_e          op,
  input  phase_e            phase,
  input  logic [FW-1:0]     fetch_idx,
  input  logic [LW-1:0]     copy_idx,
  // neighbour links
  input  logic [PKT_W-1:0]  n_in,
  input  logic [PKT_W-1:0]  e_in,
  input  logic [PKT_W-1:0]  s_in,
  input  logic [PKT_W-1:0]  w_in,
  output logic [PKT_W-1:0]  cr_out,
  output logic              busy,      // CR holds a valid packet
  // packet load chain
  input  logic [LPKT_W-1:0] pkt_in,
  output logic [LPKT_W-1:0] pkt_out,
  // vector load chain
  input  logic              vec_in_valid,
  input  logic [K-1:0]      vec_in,
  output logic              vec_out_valid,
  output logic [K-1:0]      vec_out,
  output logic              vec_full,
  // unload chain
  input  logic              unl_in_valid,
  input  logic [K-1:0]      unl_in,
  output logic              unl_in_ready,
  output logic              unl_out_valid,
  output logic [K-1:0]      unl_out,
  input  logic              unl_out_ready
);

  typedef struct packed {
    logic          valid;
    logic [CW-1:0] r;
    logic [CW-1:0] c;
    logic [LW-1:0] lo;
    logic [K-1:0]  vec;
  } pkt_t;

  // ---------------- status bits (constants)
  localparam bit ROW_ODD    = (ROW % 2) == 1;
  localparam bit COL_ODD    = (COL % 2) == 1;
  localparam bit TOP_END    = (ROW == 0);
  localparam bit BOTTOM_END = (ROW == M - 1);
  localparam bit LEFT_END   = (COL == 0);
  localparam bit RIGHT_END  = (COL == M - 1);
  localparam bit TOP_START  = !ROW_ODD;
  // A cell with ROW + COL even meets its neighbours clockwise (top, right,
  // bottom, left), the others anticlockwise; this follows from TOP_START and
  // COL_ODD and needs no bit of its own.

  localparam logic [CW-1:0] OWN_R = CW'(ROW);
  localparam logic [CW-1:0] OWN_C = CW'(COL);

  // ---------------- CU: decode of the global operation
  logic do_fetch, do_step, do_check;
  dir_e dir;
  assign do_fetch = (op == OP_FETCH);
  // a cell without a partner in this phase (mesh edge) keeps its packet
  assign do_step  = (op == OP_STEP) && (dir != DIR_NONE);
  assign do_check = do_fetch || (op == OP_STEP);

  // ---------------- neighbour selection for this phase
  always_comb begin
    unique case (phase)
      PH_UP:    dir = TOP_START ? (TOP_END    ? DIR_NONE : DIR_NORTH)
                                : (BOTTOM_END ? DIR_NONE : DIR_SOUTH);
      PH_DOWN:  dir = TOP_START ? (BOTTOM_END ? DIR_NONE : DIR_SOUTH)
                                : (TOP_END    ? DIR_NONE : DIR_NORTH);
      PH_RIGHT: dir = !COL_ODD ? (RIGHT_END ? DIR_NONE : DIR_EAST)
                               : (LEFT_END  ? DIR_NONE : DIR_WEST);
      PH_LEFT:  dir = !COL_ODD ? (LEFT_END  ? DIR_NONE : DIR_WEST)
                               : (RIGHT_END ? DIR_NONE : DIR_EAST);
      default:  dir = DIR_NONE;
    endcase
  end

  pkt_t cr, newp, nbr, cand, fetch_p;
  logic row_col, oper;
  always_comb begin
    unique case (dir)
      DIR_NORTH: nbr = pkt_t'(n_in);
      DIR_EAST:  nbr = pkt_t'(e_in);
      DIR_SOUTH: nbr = pkt_t'(s_in);
      DIR_WEST:  nbr = pkt_t'(w_in);
      default:   nbr = '0;  // no neighbour: an empty packet
    endcase
    row_col = (dir == DIR_NORTH) || (dir == DIR_SOUTH);
    oper    = (dir == DIR_SOUTH) || (dir == DIR_EAST);
  end

  // R1: in the two-cycle variant the partner's packet is registered in an
  // OP_SELECT cycle and compared in the following OP_STEP cycle; neither CR
  // changes in between, so the result is the same as in one cycle.
  if (R1_STAGE) begin : g_r1
    pkt_t r1;
    always_ff @(posedge clk) if (op == OP_SELECT) r1 <= nbr;
    assign newp = r1;
  end else begin : g_nor1
    assign newp = nbr;
  end

  // ---------------- comparator
  logic exchange, annihilate, eq_packet;
  mr_comparator #(.CW(CW), .LW(LW)) u_cmp (
    .row_col   (row_col),
    .oper      (oper),
    .own_row   (OWN_R),
    .own_col   (OWN_C),
    .cur_valid (cr.valid),
    .cur_row   (cr.r),
    .cur_col   (cr.c),
    .cur_lo    (cr.lo),
    .new_valid (newp.valid),
    .new_row   (newp.r),
    .new_col   (newp.c),
    .new_lo    (newp.lo),
    .exchange  (exchange),
    .annihilate(annihilate),
    .eq_packet (eq_packet)
  );

  // ---------------- current packet unit
  logic deliver;
  logic [PKT_W-1:0] cr_v, cand_v;
  mr_current_packet #(.PKT_W(PKT_W), .K(K)) u_cur (
    .clk       (clk),
    .rst_n     (rst_n),
    .fetch     (do_fetch),
    .fetch_pkt (fetch_p),
    .step      (do_step),
    .new_pkt   (newp),
    .exchange  (exchange),
    .annihilate(annihilate),
    .eq_packet (eq_packet),
    .deliver   (deliver),
    .cand      (cand_v),
    .cr        (cr_v)
  );
  assign cr     = pkt_t'(cr_v);
  assign cand   = pkt_t'(cand_v);
  assign cr_out = cr;
  assign busy   = cr.valid;

  // ---------------- loading unit
  logic          vec_store;
  logic [LW-1:0] vec_addr;
  logic [K-1:0]  copy_data;
  mr_loading_unit #(.P(P), .D(D), .K(K), .CW(CW), .LW(LW), .LPKT_W(LPKT_W)) u_load (
    .clk          (clk),
    .rst_n        (rst_n),
    .own_row      (OWN_R),
    .own_col      (OWN_C),
    .pkt_clr      (op == OP_CLR_PKT),
    .pkt_shift    (op == OP_LOAD_PKT),
    .pkt_in       (pkt_in),
    .pkt_out      (pkt_out),
    .vec_clr      (op == OP_CLR_VEC),
    .vec_en       (op == OP_LOAD_VEC),
    .vec_in_valid (vec_in_valid),
    .vec_in       (vec_in),
    .vec_out_valid(vec_out_valid),
    .vec_out      (vec_out),
    .vec_full     (vec_full),
    .vec_store    (vec_store),
    .vec_addr     (vec_addr),
    .fetch_idx    (fetch_idx),
    .fetch_valid  (fetch_p.valid),
    .fetch_row    (fetch_p.r),
    .fetch_col    (fetch_p.c),
    .fetch_lo     (fetch_p.lo),
    .fetch_vec    (fetch_p.vec),
    .copy_en      (op == OP_COPY),
    .copy_addr    (copy_idx),
    .copy_data    (copy_data),
    .unload_clr   (op == OP_CLR_UNLD),
    .unload_en    (op == OP_UNLOAD),
    .unl_in_valid (unl_in_valid),
    .unl_in       (unl_in),
    .unl_in_ready (unl_in_ready),
    .unl_out_valid(unl_out_valid),
    .unl_out      (unl_out),
    .unl_out_ready(unl_out_ready)
  );

  // ---------------- result calculation unit
  mr_result_unit #(.P(P), .K(K), .CW(CW), .LW(LW)) u_res (
    .clk      (clk),
    .own_row  (OWN_R),
    .own_col  (OWN_C),
    .check    (do_check),
    .pkt_valid(cand.valid),
    .pkt_row  (cand.r),
    .pkt_col  (cand.c),
    .pkt_lo   (cand.lo),
    .pkt_vec  (cand.vec),
    .deliver  (deliver),
    .clr_en   (vec_store || (op == OP_COPY)),
    .clr_addr (vec_store ? vec_addr : copy_idx),
    .rd_addr  (copy_idx),
    .rd_data  (copy_data)
  );

endmodule
