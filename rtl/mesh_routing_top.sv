// Mesh-routing sparse matrix-by-vector multiplier over GF(2), the building
// block of the matrix step of the Number Field Sieve (block Wiedemann needs
// about 3D/K products of the huge sparse matrix with K vectors).
//
// One call multiplies a sub-matrix of N = M*M*P rows and columns, with at
// most D non-zero entries per column, by K vectors of N bits at once.  Each
// non-zero entry A[i][j] becomes a packet that starts in the cell owning
// column j, picks up the K bits v[j], travels through the M x M mesh by
// clockwise transposition routing to the cell owning row i, and is xored
// into result word i there.  Defaults are the document's improved design on
// one FPGA: M = 12, P = 16 columns per cell (2304 x 2304 sub-matrix), D = 1,
// K = 50.  P = 1 gives the basic design.
//
// Index mapping: matrix index x lives in cell x / P (row-major: row
// (x/P)/M, column (x/P)%M) at word x % P.
//
// Host interface (all on clk, active-low asynchronous reset rst_n):
//   cmd_valid/cmd/cmd_ready  one command at a time (mr_pkg::mesh_cmd_e)
//   in_valid/in_ready        one beat per lane: pkt_in[l] during
//                            CMD_LOAD_PKT, vec_in[l] during CMD_LOAD_VEC
//   pkt_in[l]                {st, r, c, lo, ri, ci, src}: st = 1 for an
//                            entry, (r, c, lo) = row index i, (ri, ci, src) =
//                            column index j, both mapped as above
//   res_valid/res_data/res_ready  results during CMD_UNLOAD
//   done                     one-cycle pulse at the end of each command
//   route_overrun            a routing iteration hit MAX_PHASES steps
// Lane l serves mesh rows l*M/LANES .. (l+1)*M/LANES-1.  Packet slots go in
// for the lane's last cell first, P*D slots per cell (st = 0 for an unused
// slot); vector words go in for the lane's first cell first, P words per
// cell; results come out last cell first, words 0..P-1 of each cell.
//
// Timing: packet loading D*P*M*M/LANES beats; vector loading P*M*M/LANES
// beats plus the ripple through the chain; multiplication P*D iterations of
// one fetch cycle plus at most MAX_PHASES = 4*M compare-exchanges
// (X cycles each), plus P copy cycles; unloading P*M*M/LANES beats.
// X = 1 is the stand-alone design; X = 2 adds register R1 in every cell, as
// in the variant the document pipelines for a 10 ns platform clock.
module mesh_routing_top
  import mr_pkg::*;
#(
  parameter int unsigned M          = 12,
  parameter int unsigned P          = 16,
  parameter int unsigned D          = 1,
  parameter int unsigned K          = 50,
  parameter int unsigned LANES      = 1,
  parameter int unsigned MAX_PHASES = 4 * M,
  parameter int unsigned X          = 1,  // clock cycles per compare-exchange: 1 or 2
  localparam int unsigned CW     = idx_w(M),
  localparam int unsigned LW     = idx_w(P),
  localparam int unsigned FW     = idx_w(P*D),
  localparam int unsigned LPKT_W = 1 + 4*CW + 2*LW
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         cmd_valid,
  input  mesh_cmd_e                    cmd,
  output logic                         cmd_ready,
  input  logic                         in_valid,
  output logic                         in_ready,
  input  logic [LANES-1:0][LPKT_W-1:0] pkt_in,
  input  logic [LANES-1:0][K-1:0]      vec_in,
  output logic [LANES-1:0]             res_valid,
  output logic [LANES-1:0][K-1:0]      res_data,
  input  logic                         res_ready,
  output logic                         done,
  output logic                         route_overrun
);

  mesh_op_e        op;
  phase_e          phase;
  logic [FW-1:0]   fetch_idx;
  logic [LW-1:0]   copy_idx;
  logic            mesh_busy, vec_done, unloading;
  logic [LANES-1:0] m_res_valid;

  mr_controller #(.M(M), .P(P), .D(D), .LANES(LANES), .MAX_PHASES(MAX_PHASES), .X(X)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .cmd_valid    (cmd_valid),
    .cmd          (cmd),
    .cmd_ready    (cmd_ready),
    .in_valid     (in_valid),
    .in_ready     (in_ready),
    .res_fire     (res_valid[0] && res_ready),
    .mesh_busy    (mesh_busy),
    .vec_done     (vec_done),
    .op           (op),
    .phase        (phase),
    .fetch_idx    (fetch_idx),
    .copy_idx     (copy_idx),
    .unloading    (unloading),
    .done         (done),
    .route_overrun(route_overrun)
  );

  mr_mesh #(.M(M), .P(P), .D(D), .K(K), .LANES(LANES), .R1_STAGE(X > 1)) u_mesh (
    .clk         (clk),
    .rst_n       (rst_n),
    .op          (op),
    .phase       (phase),
    .fetch_idx   (fetch_idx),
    .copy_idx    (copy_idx),
    .pkt_in      (pkt_in),
    .vec_in_valid({LANES{in_valid && in_ready && (op == OP_LOAD_VEC)}}),
    .vec_in      (vec_in),
    .res_valid   (m_res_valid),
    .res_data    (res_data),
    .res_ready   ({LANES{res_ready && unloading}}),
    .busy        (mesh_busy),
    .vec_done    (vec_done)
  );

  assign res_valid = m_res_valid & {LANES{unloading}};

endmodule
