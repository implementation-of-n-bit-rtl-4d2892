// tb_srt_head_cell: exhaustive check of quotient digit selection and of the
// folding of the leading digits.
//
// For all 4^3 encodings of the three leading digits, the reference estimate
// e = 4*y_hi + 2*y_mid + y_lo (in halves) must give q = sign(e). For every
// incoming carry part, whenever 2*y_hi + y_mid + cin is a single digit, the
// folded leading digit must carry exactly that value.
module tb_srt_head_cell;
  import srt_pkg::*;

  bs_digit_t y_hi, y_mid, y_lo, cin, q, w_top;
  int        checks = 0, failures = 0;
  int        n_plus = 0, n_minus = 0, n_zero = 0;

  srt_head_cell dut (.y_hi(y_hi), .y_mid(y_mid), .y_lo(y_lo), .cin(cin),
                     .q(q), .w_top(w_top));

  function automatic int v(bs_digit_t x);
    return int'(x.p) - int'(x.n);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, t, qref;
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        for (int c = 0; c < 4; c++)
          for (int k = 0; k < 4; k++) begin
            y_hi = bs_digit_t'(a); y_mid = bs_digit_t'(b);
            y_lo = bs_digit_t'(c); cin = bs_digit_t'(k);
            #1;
            e = 4 * v(y_hi) + 2 * v(y_mid) + v(y_lo);
            qref = (e > 0) ? 1 : (e < 0) ? -1 : 0;
            checks++;
            if (v(q) != qref || (q.p & q.n)) begin
              failures++;
              $display("FAIL select e=%0d q=%b", e, q);
            end
            if (qref > 0) n_plus++; else if (qref < 0) n_minus++; else n_zero++;
            t = 2 * v(y_hi) + v(y_mid) + v(cin);
            if (t >= -1 && t <= 1) begin
              checks++;
              if (v(w_top) != t) begin
                failures++;
                $display("FAIL fold t=%0d w_top=%b", t, w_top);
              end
            end
          end
    $display("selections: +1 %0d, 0 %0d, -1 %0d", n_plus, n_zero, n_minus);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
