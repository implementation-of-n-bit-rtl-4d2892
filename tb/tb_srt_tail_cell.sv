// tb_srt_tail_cell: exhaustive check of the borrow-save tail cell.
//
// Every digit encoding y, divisor bit d and incoming carry part that a row
// can present is applied for each quotient digit. The reference is the
// arithmetic identity value(w) + 2*value(cout) = value(y) - q*d + value(cin),
// plus the carry polarity rule (an add hands over only positive bits, a
// subtract only negative ones, a pass nothing), which is what lets the
// digits of a row combine without a carry chain.
module tb_srt_tail_cell;
  import srt_pkg::*;

  bs_digit_t y, q, cin, w, cout;
  logic      d;
  int        checks = 0, failures = 0;

  srt_tail_cell dut (.y(y), .d(d), .q(q), .cin(cin), .w(w), .cout(cout));

  function automatic int v(bs_digit_t x);
    return int'(x.p) - int'(x.n);
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: y=%b d=%b q=%b cin=%b -> w=%b cout=%b", what, y, d, q, cin, w, cout);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int qv;
    for (int qi = 0; qi < 3; qi++) begin
      q  = (qi == 0) ? BS_ZERO : (qi == 1) ? BS_PLUS : BS_MINUS;
      qv = v(q);
      for (int yi = 0; yi < 4; yi++) begin
        for (int di = 0; di < 2; di++) begin
          for (int ci = 0; ci < 2; ci++) begin
            y   = bs_digit_t'(yi);
            d   = di[0];
            // The part coming from the right has the row's polarity.
            if (qv < 0)      cin = '{p: ci[0], n: 1'b0};
            else if (qv > 0) cin = '{p: 1'b0, n: ci[0]};
            else             cin = BS_ZERO;
            #1;
            check(v(w) + 2 * v(cout) == v(y) - qv * int'(d) + v(cin), "value");
            if (qv < 0)      check(cout.n == 1'b0, "add hands over a positive bit");
            else if (qv > 0) check(cout.p == 1'b0, "subtract hands over a negative bit");
            else             check(cout == BS_ZERO && w == y, "pass");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
