// Exhaustive test of the compare-exchange decision.  For every pair of
// neighbouring cells on a line of 8 positions, every validity combination
// and a spread of packet destinations, both cells of the pair evaluate the
// comparator (one with oper = 1, one with oper = 0).  The expected decision
// is worked out from distances: two valid packets are swapped when that
// lowers the distance still to travel of the farther one; a lone packet
// moves when that brings it closer; equal destinations merge into the cell
// on the side of the destination.  The test also checks that the two cells
// agree, i.e. no packet is lost or duplicated.
module tb_mr_comparator;
  localparam int unsigned CW = 3, LW = 2;
  int unsigned checks = 0, failures = 0;

  logic          row_col, oper;
  logic [CW-1:0] own_row, own_col, cur_row, cur_col, new_row, new_col;
  logic [LW-1:0] cur_lo, new_lo;
  logic          cur_valid, new_valid, exchange, annihilate, eq_packet;

  mr_comparator #(.CW(CW), .LW(LW)) dut (.*);

  function automatic int absd(int x, int y);
    return (x > y) ? x - y : y - x;
  endfunction

  typedef struct { logic ex, an, eq; } dec_t;

  // evaluate the DUT for one cell; coordinates along the compared dimension
  task automatic eval(input bit rc, input bit op, input int own, input int other_dim,
                      input bit cv, input int cc, input int co, input int cl,
                      input bit nv, input int nc, input int no, input int nl, output dec_t d);
    row_col = rc; oper = op;
    own_row = rc ? CW'(own) : CW'(other_dim);
    own_col = rc ? CW'(other_dim) : CW'(own);
    cur_valid = cv; cur_row = rc ? CW'(cc) : CW'(co); cur_col = rc ? CW'(co) : CW'(cc); cur_lo = LW'(cl);
    new_valid = nv; new_row = rc ? CW'(nc) : CW'(no); new_col = rc ? CW'(no) : CW'(nc); new_lo = LW'(nl);
    #1;
    d.ex = exchange; d.an = annihilate; d.eq = eq_packet;
  endtask

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    dec_t dl, dh;
    for (int rc = 0; rc < 2; rc++)
    for (int il = 0; il < 7; il++)
    for (int av = 0; av < 2; av++)
    for (int bv = 0; bv < 2; bv++)
    for (int a = 0; a < 8; a++)
    for (int b = 0; b < 8; b++)
    for (int same_other = 0; same_other < 2; same_other++) begin
      automatic int ih = il + 1;
      automatic int ao = 3, bo = same_other ? 3 : 5;  // other-dimension destinations
      automatic int al = 1, bl = 1;
      bit swap, take_b, take_a, merge, keep_low;
      eval(rc[0], 1'b1, il, 2, av[0], a, ao, al, bv[0], b, bo, bl, dl);
      eval(rc[0], 1'b0, ih, 2, bv[0], b, bo, bl, av[0], a, ao, al, dh);
      merge    = av && bv && (a == b) && (ao == bo);
      keep_low = b <= il;  // a == b here
      swap     = av && bv && !merge &&
                 ((absd(a, il) > absd(b, ih) ? absd(a, il) : absd(b, ih)) >
                  (absd(b, il) > absd(a, ih) ? absd(b, il) : absd(a, ih)));
      take_b   = !av && bv && (absd(b, il) < absd(b, ih));
      take_a   = av && !bv && (absd(a, ih) < absd(a, il));
      check("low exchange",   dl.ex, swap || take_b);
      check("low annihilate", dl.an, take_a || (merge && !keep_low));
      check("low eq",         dl.eq, merge);
      check("high exchange",  dh.ex, swap || take_a);
      check("high annihilate",dh.an, take_b || (merge && keep_low));
      check("high eq",        dh.eq, merge);
      // agreement: packets before == packets after
      begin
        automatic int low_has  = ((dl.ex ? bv : av) && !dl.an) ? 1 : 0;
        automatic int high_has = ((dh.ex ? av : bv) && !dh.an) ? 1 : 0;
        check("conservation", 1'((low_has + high_has) == (av + bv - (merge ? 1 : 0))), 1'b1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
