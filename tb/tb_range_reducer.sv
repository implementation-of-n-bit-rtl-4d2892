// tb_range_reducer: checks the operand scaling and the remainder rescale of
// an 8-bit range reducer.
//
// Operand side: for every normalised divisor (top bit 1) with random
// dividends, a divisor starting '11' must come out as exactly 3 times
// itself with the dividend also tripled; one starting '10' as 4 times
// itself with the dividend quadrupled. Either way the result must start
// with '10'. Remainder side: for every remainder below 2^8, 3R with the
// reduced flag and 4R without it must both give R back.
module tb_range_reducer;
  localparam int N = 8;

  logic [2*N-1:0] x_norm;
  logic [N-1:0]   d_norm, r_out;
  logic [2*N+3:0] x_red;
  logic [N+1:0]   d_red, r_scaled;
  logic           reduced, r_reduced;
  int             checks = 0, failures = 0, n_red = 0, n_plain = 0;

  range_reducer #(.N(N)) dut (
    .x_norm(x_norm), .d_norm(d_norm), .x_red(x_red), .d_red(d_red), .reduced(reduced),
    .r_reduced(r_reduced), .r_scaled(r_scaled), .r_out(r_out));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint k;
    for (int dv = (1 << (N - 1)); dv < (1 << N); dv++) begin
      for (int it = 0; it < 8; it++) begin
        d_norm    = N'(dv);
        x_norm    = (2*N)'($urandom);
        r_reduced = 1'b0;
        r_scaled  = '0;
        #1;
        k = (dv >= 3 * (1 << (N - 2))) ? 3 : 4;
        checks++;
        if ((k == 3) != reduced || longint'(d_red) != k * dv ||
            longint'(x_red) != k * longint'(x_norm) || d_red[N+1:N] != 2'b10) begin
          failures++;
          $display("FAIL d=%0d x=%0d -> reduced=%0b d_red=%0d x_red=%0d", dv, x_norm, reduced, d_red, x_red);
        end
        if (reduced) n_red++; else n_plain++;
      end
    end
    for (int r = 0; r < (1 << N); r++) begin
      for (int m = 3; m <= 4; m++) begin
        r_reduced = (m == 3);
        r_scaled  = (N+2)'(m * r);
        #1;
        checks++;
        if (int'(r_out) != r) begin
          failures++;
          $display("FAIL rescale %0d*%0d gave %0d", m, r, r_out);
        end
      end
    end
    checks++;
    if (n_red == 0 || n_plain == 0) failures++;
    $display("reduced %0d, not reduced %0d", n_red, n_plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
