// Result calculation unit of a mesh cell: the result store P'[i].
//
// P' holds P words of K bits, one per matrix row index owned by the cell
// (P = 1 in the basic design, P = 16 in the improved design).  The 'Check
// Dest' comparator looks at the candidate current packet every fetch or
// routing step: when it is valid and its destination row and column equal the
// cell's coordinate, 'deliver' is raised and the packet's K vector bits are
// xored into the word P'[lo] selected by the packet's low address bits
// ('addr2').  A delivered packet is retired by the current packet unit.
// For the result copy of the multiplication's last step the unit reads word
// 'rd_addr' combinationally and clears word 'clr_addr' at the clock edge; the
// vector loader clears each word as the matching input word arrives, so P'
// starts at zero for every multiplication.
// The store is an array without reset (LUT-RAM in the document); the xor
// update and the destination check follow the document.
module mr_result_unit #(
  parameter int unsigned P  = 16,
  parameter int unsigned K  = 50,
  parameter int unsigned CW = 4,
  parameter int unsigned LW = 4
) (
  input  logic          clk,
  input  logic [CW-1:0] own_row,
  input  logic [CW-1:0] own_col,
  input  logic          check,     // a fetch or a routing step happens
  input  logic          pkt_valid,
  input  logic [CW-1:0] pkt_row,
  input  logic [CW-1:0] pkt_col,
  input  logic [LW-1:0] pkt_lo,
  input  logic [K-1:0]  pkt_vec,
  output logic          deliver,
  input  logic          clr_en,
  input  logic [LW-1:0] clr_addr,
  input  logic [LW-1:0] rd_addr,
  output logic [K-1:0]  rd_data
);

  logic [K-1:0] pres [P];

  assign deliver = check && pkt_valid && (pkt_row == own_row) && (pkt_col == own_col);
  assign rd_data = pres[rd_addr];

  always_ff @(posedge clk) begin
    if (clr_en) pres[clr_addr] <= '0;
    if (deliver) pres[pkt_lo] <= pres[pkt_lo] ^ pkt_vec;
  end

endmodule
