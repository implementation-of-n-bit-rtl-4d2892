// nbit_divider: generic N-bit unsigned integer divider built as a
// combinational radix-2 SRT array with borrow-save partial remainders.
//
// Data flow, all in one combinational pass:
//   1. divisor_normalizer shifts the divisor left until its top bit is '1'
//      and shifts the dividend by the same s bits (2N bits wide).
//   2. Only with RANGE_REDUCE = 1: range_reducer multiplies both operands
//      by 3/4 when the divisor starts with '11' (by 1 otherwise), so the
//      divisor always starts with '10'; the array is then two bits wider.
//   3. srt_array runs M recurrence steps R' = 2R - q*D (M = N, or N + 2
//      with range reduction) with quotient digits q in {-1, 0, +1}; no
//      carry propagates inside a step.
//   4. Two bs_converter subtractors turn the signed-digit quotient and the
//      borrow-save remainder into two's complement.
//   5. The SRT remainder lies in (-D, D). If it is negative, the quotient is
//      decremented and D added back. The remainder is then brought back to
//      the original scale: undo the range reduction, then shift right by s.
// Result: quotient = floor(dividend / divisor), remainder = dividend mod
// divisor, for every pair with a non-zero divisor. For a zero divisor,
// div_by_zero is set, the quotient is all ones and the remainder is the
// dividend.
//
// Timing: no clock; the outputs settle one array delay after the inputs
// change. The array, its cells, the normalisation, the range reduction and
// the quotient converter follow the design. The width N is generic, so one
// description serves the 4-, 8-, 16-bit and other widths; the default of
// 16 is the widest the design reports. Range reduction is off by default,
// the basic array being the design's first form. The sign correction in
// step 5, the remainder rescaling and the zero-divisor behaviour are this
// implementation's choices. The quotient converter's top bit (q_srt[M]) is
// never read: the SRT quotient is P - N of two M-bit vectors and is never
// negative here. An immediate assertion checks, in simulation, that every
// remainder returned is below the divisor.
module nbit_divider
  import srt_pkg::*;
#(
  parameter int unsigned N            = 16,    // operand width, N >= 2
  parameter bit          RANGE_REDUCE = 1'b0   // 1: divisor range reduction
) (
  input  logic [N-1:0] dividend,
  input  logic [N-1:0] divisor,
  output logic [N-1:0] quotient,
  output logic [N-1:0] remainder,
  output logic         div_by_zero
);

  localparam int unsigned SW = $clog2(N + 1);
  localparam int unsigned M  = RANGE_REDUCE ? N + 2 : N;   // array width

  logic [2*N-1:0]    x_norm;
  logic [N-1:0]      d_norm;
  logic [SW-1:0]     shift;
  logic [2*M-1:0]    x_arr;     // dividend as the array sees it
  logic [M-1:0]      d_arr;     // divisor as the array sees it
  logic              reduced;   // range reduction applied to this pair
  bs_digit_t [M-1:0] q_bs;
  bs_digit_t [M:0]   r_bs;
  logic [M:0]        q_srt;     // signed, M+1 bits
  logic [M+1:0]      r_srt;     // signed, M+2 bits; within (-D, D)
  logic [M-1:0]      q_fix;
  logic [M-1:0]      r_fix;
  logic [N-1:0]      r_norm;    // remainder of x_norm / d_norm

  divisor_normalizer #(.N(N), .SW(SW)) u_norm (
    .dividend    (dividend),
    .divisor     (divisor),
    .x_norm      (x_norm),
    .d_norm      (d_norm),
    .shift       (shift),
    .div_by_zero (div_by_zero)
  );

  if (RANGE_REDUCE) begin : g_reduce
    range_reducer #(.N(N)) u_reduce (
      .x_norm    (x_norm),
      .d_norm    (d_norm),
      .x_red     (x_arr),
      .d_red     (d_arr),
      .reduced   (reduced),
      .r_reduced (reduced),
      .r_scaled  (r_fix),
      .r_out     (r_norm)
    );
  end else begin : g_plain
    assign x_arr   = x_norm;
    assign d_arr   = d_norm;
    assign reduced = 1'b0;
    assign r_norm  = r_fix;
  end

  srt_array #(.N(M)) u_array (
    .x (x_arr),
    .d (d_arr),
    .q (q_bs),
    .r (r_bs)
  );

  bs_converter #(.W(M)) u_qconv (
    .a     (q_bs),
    .value (q_srt)
  );

  bs_converter #(.W(M + 1)) u_rconv (
    .a     (r_bs),
    .value (r_srt)
  );

  always_comb begin
    // The corrected results are known to fit in M bits, so the sums are
    // taken modulo 2^M.
    if (r_srt[M+1]) begin
      q_fix = q_srt[M-1:0] - 1'b1;
      r_fix = r_srt[M-1:0] + d_arr;
    end else begin
      q_fix = q_srt[M-1:0];
      r_fix = r_srt[M-1:0];
    end
  end

  always_comb begin
    if (div_by_zero) begin
      quotient  = '1;
      remainder = dividend;
    end else begin
      quotient  = q_fix[N-1:0];
      remainder = r_norm >> shift;
    end
  end

  // The corrected remainder is always below the divisor.
  always_comb begin
    if (!div_by_zero) begin
      assert (remainder < divisor)
        else $error("remainder %0d not below divisor %0d", remainder, divisor);
    end
  end

endmodule
