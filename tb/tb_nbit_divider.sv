// tb_nbit_divider: end-to-end test of the generic divider at the widths the
// design reports results for: 4, 8, 11 and 16 bits.
//
// The 4- and 8-bit instances are checked for every dividend/divisor pair,
// the 11- and 16-bit ones with the published example operands, corner
// cases and random pairs. The reference is the simulator's own / and %
// operators. A zero divisor must raise div_by_zero with an all-ones
// quotient and the dividend as remainder.
//
// The mechanisms of the divider are counted on the 16-bit instance and each
// must occur at least once: quotient digits +1, 0 and -1 (subtract, pass and
// add rows), a negative SRT remainder that needs the final correction, a
// divisor that needs normalising, one that is already normalised, and a
// zero divisor.
//
// The same checks run on 4-, 8- and 16-bit instances with divisor range
// reduction enabled (every pair for 4 and 8 bits); there the counts of
// reduced and unreduced divisors must both be non-zero.
module tb_nbit_divider;
  int checks = 0, failures = 0;

  // One set of ports per width.
  logic [3:0]  a4, b4, q4, r4;    logic z4;
  logic [7:0]  a8, b8, q8, r8;    logic z8;
  logic [10:0] a11, b11, q11, r11; logic z11;
  logic [15:0] a16, b16, q16, r16; logic z16;

  nbit_divider #(.N(4))  u4  (.dividend(a4),  .divisor(b4),  .quotient(q4),  .remainder(r4),  .div_by_zero(z4));
  nbit_divider #(.N(8))  u8  (.dividend(a8),  .divisor(b8),  .quotient(q8),  .remainder(r8),  .div_by_zero(z8));
  nbit_divider #(.N(11)) u11 (.dividend(a11), .divisor(b11), .quotient(q11), .remainder(r11), .div_by_zero(z11));
  nbit_divider #(.N(16)) u16 (.dividend(a16), .divisor(b16), .quotient(q16), .remainder(r16), .div_by_zero(z16));

  // Range-reduction instances.
  logic [3:0]  ra4, rb4, rq4, rr4;     logic rz4;
  logic [7:0]  ra8, rb8, rq8, rr8;     logic rz8;
  logic [15:0] ra16, rb16, rq16, rr16; logic rz16;

  nbit_divider #(.N(4),  .RANGE_REDUCE(1'b1)) v4  (.dividend(ra4),  .divisor(rb4),  .quotient(rq4),  .remainder(rr4),  .div_by_zero(rz4));
  nbit_divider #(.N(8),  .RANGE_REDUCE(1'b1)) v8  (.dividend(ra8),  .divisor(rb8),  .quotient(rq8),  .remainder(rr8),  .div_by_zero(rz8));
  nbit_divider #(.N(16), .RANGE_REDUCE(1'b1)) v16 (.dividend(ra16), .divisor(rb16), .quotient(rq16), .remainder(rr16), .div_by_zero(rz16));

  int n_red = 0, n_unred = 0;

  // Mechanism counters (16-bit instance).
  int n_qplus = 0, n_qzero = 0, n_qminus = 0, n_fix = 0, n_shift = 0, n_noshift = 0, n_dz = 0;

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit wrong(longint a, longint b, longint q, longint r, bit z, longint ones);
    if (b == 0) return !(z && q == ones && r == a);
    return z || q != a / b || r != a % b;
  endfunction

  task automatic chk(int n, longint a, longint b, longint q, longint r, bit z);
    checks++;
    if (wrong(a, b, q, r, z, (longint'(1) << n) - 1)) begin
      failures++;
      if (failures < 20)
        $display("FAIL N=%0d: %0d / %0d gave q=%0d r=%0d z=%0b", n, a, b, q, r, z);
    end
  endtask

  task automatic run16(logic [15:0] a, logic [15:0] b);
    a16 = a; b16 = b;
    #1;
    chk(16, a, b, q16, r16, z16);
    for (int k = 0; k < 16; k++) begin
      if (u16.q_bs[k] == srt_pkg::BS_PLUS)  n_qplus++;
      if (u16.q_bs[k] == srt_pkg::BS_MINUS) n_qminus++;
      if (u16.q_bs[k] == srt_pkg::BS_ZERO)  n_qzero++;
    end
    if (!z16 && u16.r_srt[17]) n_fix++;
    if (z16) n_dz++;
    else if (u16.shift != 0) n_shift++;
    else n_noshift++;
  endtask

  task automatic run11(logic [10:0] a, logic [10:0] b);
    a11 = a; b11 = b;
    #1;
    chk(11, a, b, q11, r11, z11);
  endtask

  task automatic runr16(logic [15:0] a, logic [15:0] b);
    ra16 = a; rb16 = b;
    #1;
    chk(16, a, b, rq16, rr16, rz16);
    if (!rz16) begin
      if (v16.reduced) n_red++; else n_unred++;
    end
  endtask

  initial begin
    // Published examples: 1010 / 0010, 10101010 / 00000010,
    // 01010101010 / 00000000010 and 0000000010101010 / 0000000000000010;
    // all divide by two with remainder zero.
    a4 = 4'b1010; b4 = 4'b0010; #1;
    chk(4, a4, b4, q4, r4, z4);
    checks++; if (q4 != 4'd5 || r4 != 0) failures++;
    a8 = 8'b10101010; b8 = 8'b00000010; #1;
    chk(8, a8, b8, q8, r8, z8);
    checks++; if (q8 != 8'd85 || r8 != 0) failures++;
    run11(11'b01010101010, 11'b00000000010);
    checks++; if (q11 != 11'd341 || r11 != 0) failures++;
    run16(16'b0000000010101010, 16'b0000000000000010);
    checks++; if (q16 != 16'd85 || r16 != 0) failures++;

    // 4 and 8 bits: every pair.
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        a4 = 4'(a); b4 = 4'(b); #1;
        chk(4, a, b, q4, r4, z4);
      end
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        a8 = 8'(a); b8 = 8'(b); #1;
        chk(8, a, b, q8, r8, z8);
      end

    // Range reduction: every pair at 4 and 8 bits, random pairs at 16.
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        ra4 = 4'(a); rb4 = 4'(b); #1;
        chk(4, a, b, rq4, rr4, rz4);
      end
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        ra8 = 8'(a); rb8 = 8'(b); #1;
        chk(8, a, b, rq8, rr8, rz8);
      end
    runr16(16'b0000000010101010, 16'b0000000000000010);
    runr16('1, 16'd1); runr16('1, '1); runr16('1, 16'd3); runr16(16'd5, 0);
    for (int i = 0; i < 20000; i++)
      runr16(16'($urandom), 16'($urandom) >> $urandom_range(15, 0));

    // 11 and 16 bits: corners, then random pairs with random divisor widths.
    run11('1, 11'd1); run11('1, '1); run11(0, 11'd7); run11(11'd5, 0);
    run16('1, 16'd1); run16('1, '1); run16(16'h8000, 16'hffff);
    run16(16'hfffe, 16'hffff); run16(0, 16'd3); run16(16'd1234, 0);
    run16(16'd7, 16'd9);
    for (int i = 0; i < 20000; i++) begin
      run11(11'($urandom), 11'($urandom) >> $urandom_range(10, 0));
      run16(16'($urandom), 16'($urandom) >> $urandom_range(15, 0));
    end

    $display("16-bit mechanisms: q=+1 %0d, q=0 %0d, q=-1 %0d, remainder correction %0d, normalising shift %0d, no shift %0d, zero divisor %0d",
             n_qplus, n_qzero, n_qminus, n_fix, n_shift, n_noshift, n_dz);
    checks++; if (n_qplus   == 0) failures++;
    checks++; if (n_qzero   == 0) failures++;
    checks++; if (n_qminus  == 0) failures++;
    checks++; if (n_fix     == 0) failures++;
    checks++; if (n_shift   == 0) failures++;
    checks++; if (n_noshift == 0) failures++;
    checks++; if (n_dz      == 0) failures++;
    $display("range reduction (16-bit): reduced %0d, not reduced %0d", n_red, n_unred);
    checks++; if (n_red     == 0) failures++;
    checks++; if (n_unred   == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
