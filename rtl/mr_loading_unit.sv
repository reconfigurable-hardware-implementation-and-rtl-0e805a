// Loading unit of a mesh cell: packet store R[i], vector store P[i] and the
// cell's stage of the three chains that thread the mesh in snake order.
//
// Packet chain.  Load packets {st, routing address, loading address} shift
// from cell to cell, one stage per 'pkt_shift'.  The 'decode' logic compares
// the loading address (ri, ci) of the packet entering the cell with the
// cell's coordinate; on a match with st = 1 the packet's routing address and
// its source column within the cell ('src') are written to R[wr_ptr] and the
// pointer advances.  Entries at or above the pointer read as empty packets.
// Packets beyond the DEPTH = P*D entries of the store are dropped.
//
// Vector chain.  Words of K vector bits enter the first cell of the chain,
// first cell's words first.  A cell keeps the first P valid words it sees
// (P[0..P-1]) and from then on passes every further word, with its valid
// bit, to the next cell one cycle later, so the valid signal ripples down the
// chain together with the data.  'vec_full' tells the cell has its P words;
// 'vec_store'/'vec_addr' let the result unit clear the matching P' word.
//
// Fetch.  'fetch_pkt' is entry R[fetch_idx] joined with the vector word
// P[src] it selects ('addr'), ready for the current packet register.
//
// Copy.  'copy_en' writes a result word from P' into P[copy_addr].
//
// Unload chain.  After 'unload_clr', the cell puts its own words P[0..P-1]
// into its output register, one per transfer, then passes on the words of
// the cells before it.  The output register moves when it is empty or the
// next stage takes it (valid/ready), so the chain streams one word per cycle
// out of its last cell: last cell's words first, in order 0..P-1.
//
// Stores are arrays without reset (LUT-RAM in the document); pointers and the
// chain valid bits are reset.  Shifting through the cells and the rippled
// valid bit follow the document; the valid/ready unload chain is this
// design's choice so that P can stay a memory during unloading.
module mr_loading_unit
  import mr_pkg::*;
#(
  parameter int unsigned P  = 16,
  parameter int unsigned D  = 1,
  parameter int unsigned K  = 50,
  parameter int unsigned CW = 4,
  parameter int unsigned LW = 4,
  parameter int unsigned LPKT_W = 1 + 4*CW + 2*LW  // load packet width
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CW-1:0]     own_row,
  input  logic [CW-1:0]     own_col,
  // packet chain
  input  logic              pkt_clr,
  input  logic              pkt_shift,
  input  logic [LPKT_W-1:0] pkt_in,
  output logic [LPKT_W-1:0] pkt_out,
  // vector chain
  input  logic              vec_clr,
  input  logic              vec_en,
  input  logic              vec_in_valid,
  input  logic [K-1:0]      vec_in,
  output logic              vec_out_valid,
  output logic [K-1:0]      vec_out,
  output logic              vec_full,
  output logic              vec_store,
  output logic [LW-1:0]     vec_addr,
  // fetch of the packet for routing iteration fetch_idx
  input  logic [idx_w(P*D)-1:0] fetch_idx,
  output logic              fetch_valid,
  output logic [CW-1:0]     fetch_row,
  output logic [CW-1:0]     fetch_col,
  output logic [LW-1:0]     fetch_lo,
  output logic [K-1:0]      fetch_vec,
  // copy of results into P
  input  logic              copy_en,
  input  logic [LW-1:0]     copy_addr,
  input  logic [K-1:0]      copy_data,
  // unload chain
  input  logic              unload_clr,
  input  logic              unload_en,
  input  logic              unl_in_valid,
  input  logic [K-1:0]      unl_in,
  output logic              unl_in_ready,
  output logic              unl_out_valid,
  output logic [K-1:0]      unl_out,
  input  logic              unl_out_ready
);

  localparam int unsigned DEPTH = P * D;
  localparam int unsigned PW    = idx_w(DEPTH + 1);  // write pointer width
  localparam int unsigned VW    = idx_w(P + 1);      // vector counter width

  typedef struct packed {
    logic          st;
    logic [CW-1:0] r;    // routing address: destination row
    logic [CW-1:0] c;    //                  destination column
    logic [LW-1:0] lo;   //                  word inside the destination
    logic [CW-1:0] ri;   // loading address: row of the owning cell
    logic [CW-1:0] ci;   //                  column of the owning cell
    logic [LW-1:0] src;  //                  column of A inside the cell
  } ld_pkt_t;

  typedef struct packed {
    logic [CW-1:0] r;
    logic [CW-1:0] c;
    logic [LW-1:0] lo;
    logic [LW-1:0] src;
  } entry_t;

  ld_pkt_t        lin;
  entry_t         rmem [DEPTH];
  logic [PW-1:0]  wr_ptr;
  logic [K-1:0]   pmem [P];
  logic [VW-1:0]  vcnt;
  logic [VW-1:0]  ucnt;
  logic           decode;
  logic           uo_free;
  entry_t         fe;

  assign lin    = ld_pkt_t'(pkt_in);
  assign decode = pkt_shift && lin.st && (lin.ri == own_row) && (lin.ci == own_col)
                  && (wr_ptr < PW'(DEPTH));

  // ---------------- packet chain and R[i]
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      pkt_out <= '0;
    end else begin
      if (pkt_clr) begin
        wr_ptr  <= '0;
        pkt_out <= '0;
      end else if (pkt_shift) begin
        pkt_out <= pkt_in;
        if (decode) wr_ptr <= wr_ptr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (decode) rmem[wr_ptr[idx_w(DEPTH)-1:0]] <= '{r: lin.r, c: lin.c, lo: lin.lo, src: lin.src};
  end

  // ---------------- vector chain and P[i]
  assign vec_full  = (vcnt == VW'(P));
  assign vec_store = vec_en && vec_in_valid && !vec_full;
  assign vec_addr  = LW'(vcnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vcnt          <= '0;
      vec_out_valid <= 1'b0;
      vec_out       <= '0;
    end else if (vec_clr) begin
      vcnt          <= '0;
      vec_out_valid <= 1'b0;
    end else if (vec_en) begin
      vec_out_valid <= vec_in_valid && vec_full;
      vec_out       <= vec_in;
      if (vec_store) vcnt <= vcnt + 1'b1;
    end
  end

  // ---------------- fetch
  assign fe          = rmem[fetch_idx];
  assign fetch_valid = (PW'(fetch_idx) < wr_ptr);
  assign fetch_row   = fe.r;
  assign fetch_col   = fe.c;
  assign fetch_lo    = fe.lo;
  assign fetch_vec   = pmem[fe.src];

  // ---------------- unload chain
  assign uo_free      = !unl_out_valid || unl_out_ready;
  assign unl_in_ready = unload_en && uo_free && (ucnt == VW'(P));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ucnt          <= '0;
      unl_out_valid <= 1'b0;
      unl_out       <= '0;
    end else if (unload_clr) begin
      ucnt          <= '0;
      unl_out_valid <= 1'b0;
    end else if (unload_en && uo_free) begin
      if (ucnt != VW'(P)) begin
        unl_out       <= pmem[LW'(ucnt)];
        unl_out_valid <= 1'b1;
        ucnt          <= ucnt + 1'b1;
      end else begin
        unl_out       <= unl_in;
        unl_out_valid <= unl_in_valid;
      end
    end
  end

  // ---------------- P[i] writes: vector loading and result copy
  always_ff @(posedge clk) begin
    if (vec_store) pmem[LW'(vcnt)] <= vec_in;
    else if (copy_en) pmem[copy_addr] <= copy_data;
  end

endmodule
