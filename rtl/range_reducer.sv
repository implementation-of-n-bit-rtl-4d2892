// range_reducer: optional divisor range reduction for the SRT array, and
// the matching rescaling of the final remainder.
//
// A normalised divisor starts with '1'. When its second bit is also '1'
// (d in [3/4, 1)), both divisor and dividend are multiplied by 3/4, which
// leaves the quotient unchanged and brings the divisor into [9/16, 3/4), so
// that it starts with '10'. To keep every bit, the scaled operands are two
// bits wider: d_red = 3*d_norm and x_red = 3*x_norm when reducing, and
// d_red = 4*d_norm, x_red = 4*x_norm (a plain two-bit shift) otherwise.
// The array then divides x_red by d_red and leaves a remainder that is 3
// or 4 times the wanted one. The rescale side undoes that: a shift by two,
// or an exact division by 3, done as a multiplication by the inverse of 3
// modulo 2^N (binary ...1010_1011), which is exact because the value is a
// known multiple of 3.
//
// The two top bits of x_red are always zero (3*x_norm < 2^(2N+2)); they are
// there because the array takes a dividend twice the divisor's width.
//
// Purely combinational. The reduction rule (multiply both operands by 3/4
// when the divisor's second bit is set) follows the design; the two-bit
// widening and the remainder rescaling are this implementation's choices.
module range_reducer #(
  parameter int unsigned N = 16   // operand width, N >= 2
) (
  // operand side
  input  logic [2*N-1:0] x_norm,    // normalised dividend
  input  logic [N-1:0]   d_norm,    // normalised divisor, d_norm[N-1] = 1
  output logic [2*N+3:0] x_red,     // scaled dividend
  output logic [N+1:0]   d_red,     // scaled divisor, starts with '10'
  output logic           reduced,   // 1: scaled by 3, 0: scaled by 4
  // remainder side
  input  logic           r_reduced, // the operands of this remainder were scaled by 3
  input  logic [N+1:0]   r_scaled,  // remainder of x_red / d_red
  output logic [N-1:0]   r_out      // remainder of x_norm / d_norm
);

  // Inverse of 3 modulo 2^N: bit 0 and every odd bit set.
  function automatic logic [N-1:0] inv3();
    logic [N-1:0] v = '0;
    for (int i = 0; i < int'(N); i++) v[i] = (i == 0) || (i % 2 == 1);
    return v;
  endfunction

  localparam logic [N-1:0] INV3 = inv3();

  logic [N-1:0] r_div3;

  assign reduced = d_norm[N-2];

  always_comb begin
    if (reduced) begin
      d_red = {2'b00, d_norm} + {1'b0, d_norm, 1'b0};
      x_red = {4'b0000, x_norm} + {3'b000, x_norm, 1'b0};
    end else begin
      d_red = {d_norm, 2'b00};
      x_red = {2'b00, x_norm, 2'b00};
    end
  end

  assign r_div3 = r_scaled[N-1:0] * INV3;
  assign r_out  = r_reduced ? r_div3 : r_scaled[N+1:2];

endmodule
