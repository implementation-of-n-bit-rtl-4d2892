// srt_addsub_row: one step of the radix-2 SRT recurrence R' = 2R - q*D,
// built as one head cell and N tail cells.
//
// Digit indexing: the remainder R has N+1 BS digits, r_in[N] at weight 1
// down to r_in[0] at weight 2^-N; the normalised divisor d has its bits
// d[N-1] (always 1, weight 1/2) down to d[0] (weight 2^-N). Doubling R is
// pure wiring: y[i] = r_in[i-1], and the lowest position takes the next
// dividend bit x_in. Tail cell i adds, subtracts or passes d[i] at y[i]; the
// head cell chooses q from y[N+1], y[N], y[N-1] and folds y[N+1], y[N] and
// the leading tail cell's carry into r_out[N].
//
// Purely combinational; the delay is one head cell, one tail cell and the
// fan-out of q, independent of N.
module srt_addsub_row
  import srt_pkg::*;
#(
  parameter int unsigned N = 16   // divisor width
) (
  input  bs_digit_t [N:0]   r_in,   // partial remainder R
  input  logic              x_in,   // next dividend bit, enters at 2^-N
  input  logic      [N-1:0] d,      // normalised divisor, d[N-1] = 1
  output bs_digit_t         q,      // quotient digit of this row
  output bs_digit_t [N:0]   r_out   // new partial remainder 2R - q*d
);

  bs_digit_t [N+1:0] y;     // 2R plus the incoming dividend bit
  bs_digit_t [N:0]   carry; // carry[i] is handed from position i-1 to i

  assign y[0] = '{p: x_in, n: 1'b0};
  for (genvar i = 1; i <= N + 1; i++) begin : g_shift
    assign y[i] = r_in[i-1];
  end

  assign carry[0] = BS_ZERO;
  for (genvar i = 0; i < N; i++) begin : g_tail
    srt_tail_cell u_tail (
      .y    (y[i]),
      .d    (d[i]),
      .q    (q),
      .cin  (carry[i]),
      .w    (r_out[i]),
      .cout (carry[i+1])
    );
  end

  srt_head_cell u_head (
    .y_hi  (y[N+1]),
    .y_mid (y[N]),
    .y_lo  (y[N-1]),
    .cin   (carry[N]),
    .q     (q),
    .w_top (r_out[N])
  );

endmodule
