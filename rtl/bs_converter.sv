// bs_converter: converts a W-digit borrow-save number into W+1-bit two's
// complement.
//
// The value P - N of the positive and negative bit vectors is formed as
// P + ~N + 1. Each digit gives the carry network one of three signals:
// digit 0 propagates (P), digit +1 generates (G), digit -1 kills (K). The
// carries come from a parallel-prefix (Kogge-Stone) network of G/P combine
// cells with the +1 folded into position 0, so the delay grows with log2(W).
// Sum bit i is p ^ ~n ^ c[i]; the sign bit is ~c[W].
//
// Purely combinational. The digit-to-G/P/K mapping follows the design's
// quotient converter; the prefix topology is this implementation's choice.
module bs_converter
  import srt_pkg::*;
#(
  parameter int unsigned W = 17   // number of BS digits
) (
  input  bs_digit_t [W-1:0] a,
  output logic      [W:0]   value   // two's complement of a
);

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] g [LEVELS+1];
  logic [W-1:0] p [LEVELS+1];
  logic [W-1:0] half;   // p ^ ~n, the propagate bit of each digit
  logic [W:0]   c;      // c[i]: carry into position i

  for (genvar i = 0; i < W; i++) begin : g_digit
    assign half[i] = a[i].p ^ ~a[i].n;
    if (i == 0) begin : g_first
      // The +1 of the two's complement enters as a carry into position 0.
      assign g[0][i] = (a[i].p & ~a[i].n) | half[i];
    end else begin : g_rest
      assign g[0][i] = a[i].p & ~a[i].n;
    end
    assign p[0][i] = half[i];
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar i = 0; i < W; i++) begin : g_cell
      if (i >= (1 << l)) begin : g_combine
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-(1<<l)]);
        assign p[l+1][i] = p[l][i] & p[l][i-(1<<l)];
      end else begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  assign c[0] = 1'b1;
  assign c[W:1] = g[LEVELS];

  for (genvar i = 0; i < W; i++) begin : g_sum
    assign value[i] = half[i] ^ c[i];
  end
  assign value[W] = ~c[W];

endmodule
