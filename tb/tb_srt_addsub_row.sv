// tb_srt_addsub_row: checks one SRT recurrence step on a 6-bit row.
//
// Random normalised divisors d (top bit 1) and random remainders R with
// |R| < d are applied, each in a random borrow-save encoding (a random
// negative vector n, positive vector p = R + n). With y = 2R + x_in, the
// reference requires: q = +1 gives y - d, q = -1 gives y + d, q = 0 gives
// y; the new remainder stays strictly inside (-d, d); and the selection is
// legal (q = +1 only for y > 0, q = -1 only for y < 0). All values are
// integers in units of the divisor's last bit.
module tb_srt_addsub_row;
  import srt_pkg::*;

  localparam int N = 6;

  bs_digit_t [N:0]   r_in, r_out;
  bs_digit_t         q;
  logic              x_in;
  logic      [N-1:0] d;
  int                checks = 0, failures = 0;
  int                n_plus = 0, n_minus = 0, n_zero = 0;

  srt_addsub_row #(.N(N)) dut (.r_in(r_in), .x_in(x_in), .d(d), .q(q), .r_out(r_out));

  function automatic int bs_val(bs_digit_t [N:0] r);
    int s = 0;
    for (int i = 0; i <= N; i++) s += (int'(r[i].p) - int'(r[i].n)) << i;
    return s;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dv, rv, nv, pv, y, qv, res;
    for (int it = 0; it < 20000; it++) begin
      dv = (1 << (N - 1)) | int'($urandom_range((1 << (N - 1)) - 1, 0));
      rv = int'($urandom_range(2 * dv - 2, 0)) - (dv - 1);
      do begin
        nv = int'($urandom_range((1 << (N + 1)) - 1, 0));
        pv = rv + nv;
      end while (pv < 0 || pv >= (1 << (N + 1)));
      for (int i = 0; i <= N; i++) r_in[i] = '{p: pv[i], n: nv[i]};
      d    = N'(dv);
      x_in = 1'($urandom);
      #1;
      y   = 2 * rv + int'(x_in);
      qv  = int'(q.p) - int'(q.n);
      res = bs_val(r_out);
      checks++;
      if ((q.p & q.n) || res != y - qv * dv || res >= dv || res <= -dv ||
          (qv > 0 && y <= 0) || (qv < 0 && y >= 0)) begin
        failures++;
        $display("FAIL d=%0d R=%0d x=%0d q=%0d R'=%0d", dv, rv, x_in, qv, res);
      end
      if (qv > 0) n_plus++; else if (qv < 0) n_minus++; else n_zero++;
    end
    // Each of the three row operations must have been exercised.
    checks++;
    if (n_plus == 0 || n_minus == 0 || n_zero == 0) failures++;
    $display("row operations: subtract %0d, add %0d, pass %0d", n_plus, n_minus, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
