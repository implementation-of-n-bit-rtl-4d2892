// tb_srt_array: checks the full stack of SRT rows for a 6-bit divisor.
//
// For every normalised divisor d (top bit 1) and every 12-bit dividend
// x < d * 2^6, the signed-digit quotient Q and borrow-save remainder R the
// array returns must satisfy x = Q*d + R with |R| < d, computed here with
// plain integer arithmetic.
module tb_srt_array;
  import srt_pkg::*;

  localparam int N = 6;

  logic      [2*N-1:0] x;
  logic      [N-1:0]   d;
  bs_digit_t [N-1:0]   q;
  bs_digit_t [N:0]     r;
  int                  checks = 0, failures = 0;
  int                  n_neg = 0;

  srt_array #(.N(N)) dut (.x(x), .d(d), .q(q), .r(r));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int qv, rv;
    for (int dv = (1 << (N - 1)); dv < (1 << N); dv++) begin
      for (int xv = 0; xv < dv * (1 << N); xv++) begin
        x = (2*N)'(xv);
        d = N'(dv);
        #1;
        qv = 0;
        for (int k = 0; k < N; k++) qv += (int'(q[k].p) - int'(q[k].n)) << k;
        rv = 0;
        for (int i = 0; i <= N; i++) rv += (int'(r[i].p) - int'(r[i].n)) << i;
        checks++;
        if (qv * dv + rv != xv || rv >= dv || rv <= -dv) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d d=%0d Q=%0d R=%0d", xv, dv, qv, rv);
        end
        if (rv < 0) n_neg++;
      end
    end
    $display("negative final remainders: %0d", n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
