// srt_array: the stack of N conditional adder/subtractor rows of the
// radix-2 SRT divider.
//
// With the divisor normalised (d[N-1] = 1) and the dividend shifted by the
// same amount into a 2N-bit value x, the array computes N signed quotient
// digits and a borrow-save remainder such that
//   x = Q * d + R * 2^0,  Q = sum q[k] 2^k,  |R| <= d,
// where R = sum (r[i].p - r[i].n) 2^i. Row j (j = 1..N) produces the digit of
// weight 2^(N-j) and takes in dividend bit x[N-j]; the upper N bits of x
// form the starting remainder. The requirement x < d * 2^N holds whenever x
// comes from the normaliser.
//
// Purely combinational: N rows, each of constant depth. No carry ever runs
// along a row, so the array delay grows linearly with N only.
module srt_array
  import srt_pkg::*;
#(
  parameter int unsigned N = 16   // divisor width, quotient digits
) (
  input  logic      [2*N-1:0] x,    // normalised dividend
  input  logic      [N-1:0]   d,    // normalised divisor, d[N-1] = 1
  output bs_digit_t [N-1:0]   q,    // quotient digits, q[N-1] first
  output bs_digit_t [N:0]     r     // final remainder, r[i] at weight 2^i
);

  bs_digit_t [N:0] rem [N+1];       // rem[j]: remainder entering row j+1

  // Starting remainder: the upper half of x, as positive digits.
  assign rem[0][N] = BS_ZERO;
  for (genvar i = 0; i < N; i++) begin : g_init
    assign rem[0][i] = '{p: x[N+i], n: 1'b0};
  end

  for (genvar j = 0; j < N; j++) begin : g_row
    srt_addsub_row #(.N(N)) u_row (
      .r_in  (rem[j]),
      .x_in  (x[N-1-j]),
      .d     (d),
      .q     (q[N-1-j]),
      .r_out (rem[j+1])
    );
  end

  assign r = rem[N];

endmodule
