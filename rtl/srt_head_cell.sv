// srt_head_cell: quotient digit selection and leading-digit folding for one
// row of the radix-2 SRT array.
//
// The row works on y = 2R, the doubled partial remainder, with the divisor
// normalised to d in [1/2, 1) and the invariant |R| <= d. The head cell sees
// the three leading BS digits of y, at weights 2, 1 and 1/2; the last one is
// aligned with the leading '1' of the divisor. Their value e (in halves, from
// -7 to +7) differs from y by less than 1/2, so the sign of e is enough:
//   e > 0 : q = +1 (y > 0,    so y - d stays within [-d, d])
//   e = 0 : q =  0 (|y| < 1/2 <= d)
//   e < 0 : q = -1 (y < 0,    so y + d stays within [-d, d])
// No tail cell sits at weights 2 and 1 (the divisor has no bits there). The
// head cell folds the two leading digits of y and the part the leading tail
// cell hands over (cin) into the single leading digit of the new remainder,
// 2*y[2] + y[1] + cin. Because the new remainder is below 1 in magnitude,
// this sum is always -1, 0 or +1.
//
// Purely combinational. Looking at three leading digits, aligned with the
// leading divisor bit, follows the design; the plain sign rule for the
// selection is this implementation's choice (it needs only one zero code).
module srt_head_cell
  import srt_pkg::*;
(
  input  bs_digit_t y_hi,   // digit of y at weight 2
  input  bs_digit_t y_mid,  // digit of y at weight 1
  input  bs_digit_t y_lo,   // digit of y at weight 1/2
  input  bs_digit_t cin,    // part handed over by the leading tail cell
  output bs_digit_t q,      // selected quotient digit
  output bs_digit_t w_top   // leading digit (weight 1) of the new remainder
);

  logic signed [3:0] est;   // 4*y_hi + 2*y_mid + y_lo, in halves
  logic signed [2:0] top;   // 2*y_hi + y_mid + cin

  always_comb begin
    est = 4'sd4 * ($signed({3'b000, y_hi.p})  - $signed({3'b000, y_hi.n}))
        + 4'sd2 * ($signed({3'b000, y_mid.p}) - $signed({3'b000, y_mid.n}))
        +         ($signed({3'b000, y_lo.p})  - $signed({3'b000, y_lo.n}));
    if (est > 4'sd0)      q = BS_PLUS;
    else if (est < 4'sd0) q = BS_MINUS;
    else                  q = BS_ZERO;

    top = 3'sd2 * ($signed({2'b00, y_hi.p})  - $signed({2'b00, y_hi.n}))
        +         ($signed({2'b00, y_mid.p}) - $signed({2'b00, y_mid.n}))
        +         ($signed({2'b00, cin.p})   - $signed({2'b00, cin.n}));
    // top is -1, 0 or +1 whenever the remainder bound holds.
    w_top = '{p: (top > 3'sd0), n: (top < 3'sd0)};
  end

endmodule
