// divisor_normalizer: brings the divisor's leading '1' to its top bit and
// shifts the dividend by the same amount.
//
// The SRT head cells inspect remainder digits at a fixed position, aligned
// with the leading '1' of the divisor, so that bit must sit in a fixed place.
// A priority search finds the number of leading zeros s of the divisor;
// d_norm = divisor << s and x_norm = dividend << s (2N bits, nothing lost).
// Shifting both operands leaves the quotient unchanged and scales the
// remainder by 2^s, which the divider undoes at the end. A zero divisor
// raises div_by_zero; s and the outputs are then don't-care values (s = 0).
//
// Purely combinational. The normalisation itself follows the design; the
// leading-zero search and the shifter are the simplest circuits for it.
module divisor_normalizer #(
  parameter int unsigned N  = 16,              // operand width
  parameter int unsigned SW = $clog2(N + 1)    // width of the shift count
) (
  input  logic [N-1:0]   dividend,
  input  logic [N-1:0]   divisor,
  output logic [2*N-1:0] x_norm,       // dividend << s
  output logic [N-1:0]   d_norm,       // divisor << s, d_norm[N-1] = 1
  output logic [SW-1:0]  shift,        // s, the divisor's leading zeros
  output logic           div_by_zero
);

  always_comb begin
    shift = '0;
    for (int i = 0; i < N; i++) begin
      // The last (highest) '1' found sets the count.
      if (divisor[i]) shift = SW'(N - 1 - i);
    end
  end

  assign div_by_zero = (divisor == '0);
  assign d_norm      = divisor << shift;
  assign x_norm      = {{N{1'b0}}, dividend} << shift;

endmodule
