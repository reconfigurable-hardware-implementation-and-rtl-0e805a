// Compare-exchange decision of one mesh cell (comparator of the cell).
//
// In every compare-exchange phase two neighbouring cells send each other
// their current packet.  Each cell decides on its own, with this block,
// whether to replace its packet by the neighbour's ('exchange'), to drop its
// own packet because the neighbour takes it ('annihilate'), or to merge two
// packets bound for the same destination ('eq_packet').  Both cells of a
// pair run the same rule with opposite 'oper', so their decisions always
// agree: no packet is lost or duplicated.
//
// The first level of multiplexers picks the row or the column coordinate of
// the cell, the current packet and the new packet ('row_col').  Let the
// lower-index cell of the pair (upper or left cell, oper = 1) hold packet a
// and the higher-index cell hold packet b, both coordinates in the compared
// dimension, and let iL be the lower cell's coordinate:
//   both valid, same full destination : merge; the lower cell keeps the
//                                       merged packet when a <= iL, else the
//                                       higher cell keeps it
//   both valid, otherwise             : swap when a > b
//   only b valid                      : lower cell takes b when b <= iL
//   only a valid                      : higher cell takes a when a >= iL + 1
// The four cases and the greater/equal comparators follow the document's
// comparator description; the merge side rule is this design's choice.
// Purely combinational.
module mr_comparator #(
  parameter int unsigned CW = 4,  // coordinate width (row or column)
  parameter int unsigned LW = 4   // low address width (column within cell)
) (
  input  logic          row_col,    // 1: compare rows (vertical phase), 0: columns
  input  logic          oper,       // 1: this cell is the lower-index cell of the pair
  input  logic [CW-1:0] own_row,
  input  logic [CW-1:0] own_col,
  input  logic          cur_valid,  // s1
  input  logic [CW-1:0] cur_row,
  input  logic [CW-1:0] cur_col,
  input  logic [LW-1:0] cur_lo,
  input  logic          new_valid,  // s2
  input  logic [CW-1:0] new_row,
  input  logic [CW-1:0] new_col,
  input  logic [LW-1:0] new_lo,
  output logic          exchange,
  output logic          annihilate,
  output logic          eq_packet
);

  logic [CW-1:0] own_c, cur_c, new_c;
  logic          same_dest;
  logic          keep_low;

  always_comb begin
    own_c = row_col ? own_row : own_col;
    cur_c = row_col ? cur_row : cur_col;
    new_c = row_col ? new_row : new_col;
  end

  assign same_dest = (cur_row == new_row) && (cur_col == new_col) && (cur_lo == new_lo);

  always_comb begin
    exchange   = 1'b0;
    annihilate = 1'b0;
    eq_packet  = 1'b0;
    keep_low   = 1'b0;
    unique case ({cur_valid, new_valid})
      2'b11: begin
        if (same_dest) begin
          eq_packet = 1'b1;
          // coordinate of the merged packet, seen from the lower cell
          keep_low  = oper ? (cur_c <= own_c) : (cur_c < own_c);
          annihilate = oper ? !keep_low : keep_low;
        end else begin
          // lower cell: own (a) > new (b); higher cell: own (b) < new (a)
          exchange = oper ? (cur_c > new_c) : (cur_c < new_c);
        end
      end
      2'b01: begin
        // take the neighbour packet if it moves towards its destination
        exchange = oper ? (new_c <= own_c) : (new_c >= own_c);
      end
      2'b10: begin
        // the neighbour takes my packet when it is bound past me
        annihilate = oper ? (cur_c > own_c) : (cur_c < own_c);
      end
      default: ;
    endcase
  end

endmodule
