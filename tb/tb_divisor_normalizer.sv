// tb_divisor_normalizer: exhaustive divisor sweep of an 8-bit normaliser.
//
// For every divisor (with a random dividend) the reference shift is found
// by a loop counting leading zeros; the normalised divisor must have its
// top bit set, and both operands must be shifted by exactly that amount.
module tb_divisor_normalizer;
  localparam int N = 8;
  localparam int SW = $clog2(N + 1);

  logic [N-1:0]   dividend, divisor, d_norm;
  logic [2*N-1:0] x_norm;
  logic [SW-1:0]  shift;
  logic           div_by_zero;
  int             checks = 0, failures = 0;

  divisor_normalizer #(.N(N)) dut (
    .dividend(dividend), .divisor(divisor), .x_norm(x_norm),
    .d_norm(d_norm), .shift(shift), .div_by_zero(div_by_zero));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    for (int dv = 0; dv < (1 << N); dv++) begin
      divisor  = N'(dv);
      dividend = N'($urandom);
      #1;
      checks++;
      if (dv == 0) begin
        if (!div_by_zero) begin
          failures++;
          $display("FAIL zero divisor not flagged");
        end
      end else begin
        s = 0;
        while (((dv << s) & (1 << (N - 1))) == 0) s++;
        if (div_by_zero || int'(shift) != s || int'(d_norm) != (dv << s) ||
            x_norm != ({{N{1'b0}}, dividend} << s) || !d_norm[N-1]) begin
          failures++;
          $display("FAIL divisor=%h shift=%0d (exp %0d) d_norm=%h x_norm=%h",
                   divisor, shift, s, d_norm, x_norm);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
