// srt_tail_cell: one digit position of a conditional borrow-save
// adder/subtractor row.
//
// The cell receives one remainder digit y = y.p - y.n, one divisor bit d and
// the row's quotient digit q. It computes y - q*d without any carry chain:
//   q = -1 (add):      full adder on (y.p, d, ~y.n) gives 2c + s, so
//                      y + d = 2c - (1 - s): the cell keeps the negative
//                      part ~s and hands c, as a positive bit, to the digit
//                      on its left.
//   q = +1 (subtract): full adder on (y.p, ~y.n, ~d) gives 2c + s, so
//                      y - d = s - 2(1 - c): the cell keeps the positive
//                      part s and hands ~c, as a negative bit, to the left.
//   q =  0:            the digit is passed unchanged and nothing goes left.
// The resulting digit of this position combines the part kept here with the
// part handed over by the cell on the right (cin). Since cout does not
// depend on cin, nothing ripples along the row: the carry simply becomes
// part of the digit that goes down to the next row, and the delay of a row
// does not grow with its width.
//
// Purely combinational. The cell structure and its three operations follow
// the borrow-save tail cell of the design; the full-adder formulation is the
// usual one for a borrow-save adder.
module srt_tail_cell
  import srt_pkg::*;
(
  input  bs_digit_t y,     // remainder digit at this position
  input  logic      d,     // divisor bit at this position
  input  bs_digit_t q,     // quotient digit of the row (operation select)
  input  bs_digit_t cin,   // part handed over by the cell on the right
  output bs_digit_t w,     // new remainder digit at this position
  output bs_digit_t cout   // part handed over to the cell on the left
);

  logic      do_add, do_sub;
  logic      fa_a, fa_b, fa_c, fa_s, fa_co;
  bs_digit_t keep;

  assign do_add = q.n & ~q.p;
  assign do_sub = q.p & ~q.n;

  always_comb begin
    // Full adder inputs depend on the operation.
    fa_a = y.p;
    fa_b = do_sub ? ~y.n : d;
    fa_c = do_sub ? ~d   : ~y.n;
    {fa_co, fa_s} = {1'b0, fa_a} + {1'b0, fa_b} + {1'b0, fa_c};

    if (do_add) begin
      keep = '{p: 1'b0, n: ~fa_s};
      cout = '{p: fa_co, n: 1'b0};
    end else if (do_sub) begin
      keep = '{p: fa_s, n: 1'b0};
      cout = '{p: 1'b0, n: ~fa_co};
    end else begin
      keep = y;
      cout = BS_ZERO;
    end
    // Within one row the kept part and the incoming part never collide:
    // an add keeps only n and receives only p, a subtract the reverse.
    w = '{p: keep.p | cin.p, n: keep.n | cin.n};
  end

endmodule
