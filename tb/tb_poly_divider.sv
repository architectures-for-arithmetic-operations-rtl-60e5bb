// tb_poly_divider -- self-checking testbench of the LFSR polynomial divider
// over GF(8), g(x) = x^4 + a^3 x^3 + x^2 + a x + a^3.
//
// First the worked division: v(x) = a^4 x^6 + a^3 x^3 + a^6 x + a^4 must give
// the quotient a^4 x^2 + x + a^6 and the remainder x^3 + a^4 x^2 + a^5 x + a,
// and the register must pass through the printed states. Then 300 random
// dividends of degree 4..9 are divided and quotient and remainder are compared
// with long division in the reference arithmetic.
module tb_poly_divider;
  import gf_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  gf_t  in_sym = '0, q_sym;
  gf_t  rem [4];
  int checks = 0, failures = 0;

  poly_divider dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  sym_t gq [5];
  initial gq = '{r_exp(3), r_exp(1), 3'b001, r_exp(3), 3'b001};

  // printed register states s_0 .. s_3 after each shift of the worked example
  // (log alpha, -1 for 0)
  localparam int EX_ST [7][4] = '{'{4, -1, -1, -1}, '{-1, 4, -1, -1}, '{-1, -1, 4, -1},
                                  '{3, -1, -1, 4}, '{0, 2, 4, 0}, '{4, 3, 6, 6},
                                  '{1, 5, 4, 0}};
  bit chk_st = 1'b0;

  // v[i] = coefficient of x^i; returns quotient and remainder
  task automatic run(input sym_t v [], output sym_t q [], output sym_t r [4]);
    int d;
    d = v.size() - 1;
    q = new[d - 3];
    clear = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0;
    for (int t = 0; t <= d; t++) begin
      in_valid = 1'b1;
      in_sym   = v[d - t];
      #1;
      if (t >= 4) q[d - t] = q_sym;
      else check(q_sym == 0, "no quotient during the first R shifts");
      @(posedge clk); #1;
      if (chk_st)
        for (int i = 0; i < 4; i++)
          check(rem[i] == ((EX_ST[t][i] < 0) ? sym_t'(0) : r_exp(EX_ST[t][i])),
                $sformatf("worked example: stage %0d after shift %0d", i, t + 1));
    end
    in_valid = 1'b0;
    for (int i = 0; i < 4; i++) r[i] = rem[i];
  endtask

  initial begin
    sym_t v [], q [], r [4], eq [], er [];
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    v = new[7];
    v = '{r_exp(4), r_exp(6), 3'b000, r_exp(3), 3'b000, 3'b000, r_exp(4)};
    chk_st = 1'b1;
    run(v, q, r);
    chk_st = 1'b0;
    check(q.size() == 3 && q[2] == r_exp(4) && q[1] == 3'b001 && q[0] == r_exp(6),
          "worked example quotient");
    check(r[3] == 3'b001 && r[2] == r_exp(4) && r[1] == r_exp(5) && r[0] == r_exp(1),
          "worked example remainder");
    for (int n = 0; n < 300; n++) begin
      int d;
      d = $urandom_range(4, 9);
      v = new[d + 1];
      foreach (v[i]) v[i] = sym_t'($urandom_range(0, 7));
      // reference long division
      er = new[d + 1];
      er = v;
      eq = new[d - 3];
      for (int k = d; k >= 4; k--) begin
        eq[k - 4] = er[k];
        for (int j = 0; j < 5; j++) er[k - 4 + j] ^= r_mul(eq[k - 4], gq[j]);
      end
      run(v, q, r);
      for (int i = 0; i <= d - 4; i++) check(q[i] == eq[i], $sformatf("quotient %0d coefficient %0d", n, i));
      for (int i = 0; i < 4; i++) check(r[i] == er[i], $sformatf("remainder %0d coefficient %0d", n, i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
