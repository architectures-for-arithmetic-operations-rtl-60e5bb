// tb_fir_poly_mult -- self-checking testbench of the FIR polynomial
// multiplier over GF(8), h(x) = x^3 + a x + a^3.
//
// Multiplies the worked example a(x) = a^3 x^2 + x + 1 and 200 random
// polynomials of degree 0..6 by h(x): the coefficients go in high-order
// first followed by R = 3 zeros, and the k + R + 1 output coefficients,
// high-order first and in the same clock as the input, are compared with a
// convolution in the reference arithmetic.
module tb_fir_poly_mult;
  import gf_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  gf_t  in_sym = '0, out_sym;
  int checks = 0, failures = 0;

  fir_poly_mult dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input sym_t a [], input string what);
    sym_t h [4], b [];
    int k;
    h = '{r_exp(3), r_exp(1), 3'b000, 3'b001};       // h_0 .. h_3
    k = a.size() - 1;
    b = new[k + 4];
    foreach (b[i]) b[i] = '0;
    for (int i = 0; i <= k; i++)
      for (int j = 0; j < 4; j++) b[i + j] ^= r_mul(a[i], h[j]);
    clear = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0;
    for (int t = 0; t <= k + 3; t++) begin
      in_valid = 1'b1;
      in_sym   = (t <= k) ? a[k - t] : sym_t'(0);
      #1;
      checks++;
      if (out_sym !== b[k + 3 - t]) begin
        failures++;
        $display("FAIL %s: coefficient of x^%0d = %0d, expected %0d",
                 what, k + 3 - t, out_sym, b[k + 3 - t]);
      end
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
  endtask

  initial begin
    sym_t a [];
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    a = new[3];
    a = '{3'b001, 3'b001, r_exp(3)};                   // 1 + x + a^3 x^2
    run(a, "worked example");
    for (int n = 0; n < 200; n++) begin
      a = new[$urandom_range(1, 7)];
      foreach (a[i]) a[i] = sym_t'($urandom_range(0, 7));
      run(a, $sformatf("random %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
