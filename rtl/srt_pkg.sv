// srt_pkg: types shared by the cells of the radix-2 SRT array divider.
//
// The partial remainder and the quotient are kept in borrow-save (BS)
// form: every digit position carries a positive bit p and a negative bit n
// and has the value p - n, one of -1, 0 and +1 (p = n = 1 is a second
// encoding of zero). A quotient digit uses the same pair and, at the same
// time, is the two-bit control of a row of tail cells:
//   q = +1 (p=1,n=0): subtract the divisor,
//   q = -1 (p=0,n=1): add the divisor,
//   q =  0          : pass the remainder unchanged.
package srt_pkg;

  typedef struct packed {
    logic p;  // positive bit, weight +1
    logic n;  // negative bit, weight -1
  } bs_digit_t;

  localparam bs_digit_t BS_ZERO  = '{p: 1'b0, n: 1'b0};
  localparam bs_digit_t BS_PLUS  = '{p: 1'b1, n: 1'b0};
  localparam bs_digit_t BS_MINUS = '{p: 1'b0, n: 1'b1};

endpackage
