// tb_nbit_divider_full: the divider at its default width (16 bits), with no
// parameter overridden.
//
// Runs the published 16-bit example (170 / 2, remainder 0), corner cases
// (largest dividend, divisor 1, divisor equal to or above the dividend,
// zero divisor) and 100,000 random pairs whose divisors have random widths,
// all against the simulator's / and %. The quotient-digit values, the
// negative-remainder correction, the normalising shift and the zero
// divisor are each counted and must each occur.
module tb_nbit_divider_full;
  logic [15:0] dividend, divisor, quotient, remainder;
  logic        div_by_zero;
  int          checks = 0, failures = 0;
  int          n_qplus = 0, n_qzero = 0, n_qminus = 0, n_fix = 0, n_shift = 0, n_dz = 0;

  nbit_divider dut (.dividend(dividend), .divisor(divisor), .quotient(quotient),
                    .remainder(remainder), .div_by_zero(div_by_zero));

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [15:0] a, logic [15:0] b);
    bit bad;
    dividend = a; divisor = b;
    #1;
    if (b == 0) bad = !(div_by_zero && quotient == '1 && remainder == a);
    else        bad = div_by_zero || quotient != a / b || remainder != a % b;
    checks++;
    if (bad) begin
      failures++;
      if (failures < 20)
        $display("FAIL %0d / %0d gave q=%0d r=%0d z=%0b", a, b, quotient, remainder, div_by_zero);
    end
    for (int k = 0; k < 16; k++) begin
      if (dut.q_bs[k] == srt_pkg::BS_PLUS)  n_qplus++;
      if (dut.q_bs[k] == srt_pkg::BS_MINUS) n_qminus++;
      if (dut.q_bs[k] == srt_pkg::BS_ZERO)  n_qzero++;
    end
    if (div_by_zero) n_dz++;
    else begin
      if (dut.r_srt[17]) n_fix++;
      if (dut.shift != 0) n_shift++;
    end
  endtask

  initial begin
    run(16'b0000000010101010, 16'b0000000000000010);
    checks++;
    if (quotient != 16'd85 || remainder != 16'd0) failures++;
    run('1, 16'd1); run('1, '1); run(16'd100, 16'd101); run(16'd0, 16'd5);
    run(16'h8000, 16'h8000); run(16'hffff, 16'h8001); run(16'd42, 16'd0);
    for (int i = 0; i < 100000; i++)
      run(16'($urandom), 16'($urandom) >> $urandom_range(15, 0));
    $display("mechanisms: q=+1 %0d, q=0 %0d, q=-1 %0d, remainder correction %0d, normalising shift %0d, zero divisor %0d",
             n_qplus, n_qzero, n_qminus, n_fix, n_shift, n_dz);
    checks++; if (n_qplus  == 0) failures++;
    checks++; if (n_qzero  == 0) failures++;
    checks++; if (n_qminus == 0) failures++;
    checks++; if (n_fix    == 0) failures++;
    checks++; if (n_shift  == 0) failures++;
    checks++; if (n_dz     == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
