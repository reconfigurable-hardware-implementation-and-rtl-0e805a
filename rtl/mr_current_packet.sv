// Current packet unit: the packet register CR of a mesh cell.
//
// CR holds the one packet a cell is routing: a status (valid) bit, the
// destination row and column of the cell it must reach, the low address bits
// that select the result word inside that cell, and K vector bits.
// Every cycle the unit forms a candidate next packet:
//   fetch                 : the packet read from the local store R[i]/P[i]
//   step and exchange     : the neighbour's packet
//   step and annihilate   : status bit cleared (the neighbour took it)
//   step and eq_packet    : own packet with the neighbour's vector bits xored
//   otherwise             : unchanged
// The candidate goes to the result unit, whose destination check answers
// 'deliver' in the same cycle; a delivered packet is stored with its status
// bit cleared.  CR is written at the clock edge.  Reset clears the status bit.
// The register, the exchange enable and the annihilate gate follow the
// document; the merge and the delivery clear are this design's reading of how
// eq_packet and reaching the destination act on CR.
module mr_current_packet #(
  parameter int unsigned PKT_W = 63,  // 1 + 2*CW + LW + K
  parameter int unsigned K     = 50
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             fetch,
  input  logic [PKT_W-1:0] fetch_pkt,
  input  logic             step,
  input  logic [PKT_W-1:0] new_pkt,
  input  logic             exchange,
  input  logic             annihilate,
  input  logic             eq_packet,
  input  logic             deliver,
  output logic [PKT_W-1:0] cand,
  output logic [PKT_W-1:0] cr
);

  localparam int unsigned VALID_BIT = PKT_W - 1;

  always_comb begin
    cand = cr;
    if (fetch) begin
      cand = fetch_pkt;
    end else if (step) begin
      if (annihilate) begin
        cand[VALID_BIT] = 1'b0;
      end else if (eq_packet) begin
        cand[K-1:0] = cr[K-1:0] ^ new_pkt[K-1:0];
      end else if (exchange) begin
        cand = new_pkt;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cr <= '0;
    end else if (fetch || step) begin
      cr <= cand;
      if (deliver) cr[VALID_BIT] <= 1'b0;
    end
  end

endmodule
