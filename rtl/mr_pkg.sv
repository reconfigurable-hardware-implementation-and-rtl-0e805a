// Shared types of the mesh-routing sparse matrix-by-vector multiplier.
//
// The mesh is a square array of identical cells that multiplies a sparse
// GF(2) matrix by K dense vectors at once.  Every non-zero matrix entry is a
// packet that carries K vector bits to the cell that owns its row index;
// packets travel by clockwise transposition routing (four compare-exchange
// phases repeated) and are xored into the destination's result words.
//
// This package holds what the controller, the cells and the testbenches must
// agree on: the operation the controller broadcasts to all cells each cycle,
// the host command set, the four routing phases and the neighbour directions.
// The encodings are this design's own choice.
package mr_pkg;

  // Operation broadcast from the control unit to every cell (the 'state'
  // control signal of the cell).  One value per clock cycle.
  typedef enum logic [3:0] {
    OP_IDLE      = 4'd0,  // hold everything
    OP_CLR_PKT   = 4'd1,  // empty the packet store R[i] (write pointer := 0)
    OP_LOAD_PKT  = 4'd2,  // packet load chain active
    OP_CLR_VEC   = 4'd3,  // empty the vector store P[i] fill counter
    OP_LOAD_VEC  = 4'd4,  // vector load chain active (rippled valid)
    OP_FETCH     = 4'd5,  // copy packet R[idx] with its vector bits into CR
    OP_STEP      = 4'd6,  // one compare-exchange phase
    OP_COPY      = 4'd7,  // P[idx] := P'[idx], P'[idx] := 0
    OP_CLR_UNLD  = 4'd8,  // start of unloading: rewind the unload counter
    OP_UNLOAD    = 4'd9,  // result shift-out chain active
    OP_SELECT    = 4'd10  // capture the partner's packet in R1 (two-cycle
                          // compare-exchange of the pipelined cell)
  } mesh_op_e;

  // Host commands accepted by the control unit when it is idle.
  typedef enum logic [1:0] {
    CMD_LOAD_PKT = 2'd0,  // accept D*P*M*M/LANES packet slots per lane
    CMD_LOAD_VEC = 2'd1,  // accept P*M*M/LANES vector words per lane
    CMD_MULTIPLY = 2'd2,  // route all packets, then copy P' into P
    CMD_UNLOAD   = 2'd3   // shift P out of the mesh
  } mesh_cmd_e;

  // Compare-exchange phase inside one routing round (phase 1..4 of the
  // clockwise transposition algorithm, numbered 0..3 here).
  //   PH_UP    : cells of even (0-based) rows pair with the row above
  //   PH_RIGHT : cells of even columns pair with the column to the right
  //   PH_DOWN  : cells of even rows pair with the row below
  //   PH_LEFT  : cells of even columns pair with the column to the left
  typedef enum logic [1:0] {
    PH_UP    = 2'd0,
    PH_RIGHT = 2'd1,
    PH_DOWN  = 2'd2,
    PH_LEFT  = 2'd3
  } phase_e;

  typedef enum logic [2:0] {
    DIR_NONE  = 3'd0,
    DIR_NORTH = 3'd1,
    DIR_EAST  = 3'd2,
    DIR_SOUTH = 3'd3,
    DIR_WEST  = 3'd4
  } dir_e;

  // Width of an index into n items, at least one bit.
  function automatic int unsigned idx_w(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
