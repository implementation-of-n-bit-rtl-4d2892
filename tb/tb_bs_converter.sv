// tb_bs_converter: checks the borrow-save to two's complement converter.
//
// A 9-digit instance is driven with random positive and negative bit
// vectors plus the corner cases (all +1, all -1, all zero in both
// encodings); the output must equal P - N computed with integer arithmetic.
// A 1-digit instance is checked exhaustively.
module tb_bs_converter;
  import srt_pkg::*;

  localparam int W = 9;

  bs_digit_t [W-1:0] a;
  logic      [W:0]   value;
  bs_digit_t [0:0]   a1;
  logic      [1:0]   value1;
  logic      [W-1:0] pv, nv;
  int                checks = 0, failures = 0;

  bs_converter #(.W(W)) dut  (.a(a),  .value(value));
  bs_converter #(.W(1)) dut1 (.a(a1), .value(value1));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [W-1:0] p, logic [W-1:0] n);
    int ref_v;
    for (int i = 0; i < W; i++) a[i] = '{p: p[i], n: n[i]};
    #1;
    ref_v = int'(p) - int'(n);
    checks++;
    if ($signed(value) != ref_v) begin
      failures++;
      $display("FAIL p=%b n=%b value=%0d expected %0d", p, n, $signed(value), ref_v);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('1, '0);
    apply('0, '1);
    for (int i = 0; i < 2000; i++) begin
      pv = W'($urandom);
      nv = W'($urandom);
      apply(pv, nv);
    end
    for (int k = 0; k < 4; k++) begin
      a1[0] = bs_digit_t'(k);
      #1;
      checks++;
      if ($signed(value1) != int'(a1[0].p) - int'(a1[0].n)) begin
        failures++;
        $display("FAIL 1-digit %b -> %b", a1[0], value1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
