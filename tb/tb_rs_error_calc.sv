// tb_rs_error_calc -- self-checking testbench of the error calculation.
//
// For random error patterns of weight 0..2 the testbench forms
// Lambda(x) = prod (1 + alpha^i x) over the error positions and
// Omega(x) = S(x) Lambda(x) mod x^4 with the reference arithmetic, and expects
// e_i back at every position. Random degree-2 locators are also sent; the
// uncorrectable flag must be set exactly when the number of roots in GF(8)
// differs from the degree. Output timing: first value T+2 clocks after the
// edge that samples in_valid, then N consecutive positions 0..6.
module tb_rs_error_calc;
  import gf_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  gf_t  lambda [3];
  gf_t  omega [2];
  logic busy, out_valid, done, unc;
  logic [2:0] out_pos;
  gf_t  out_err;

  rs_error_calc #(.N(7), .T(2)) dut (.clk, .rst_n, .in_valid, .lambda, .omega,
    .busy, .out_valid, .out_pos, .out_err, .done, .uncorrectable(unc));

  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_unc = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // run one evaluation, return the error vector and the flag
  task automatic run(input sym_t lam [3], input sym_t om [2], output sym_t e [7],
                     output bit flag);
    int t0, got;
    in_valid <= 1'b1;
    for (int i = 0; i < 3; i++) lambda[i] <= lam[i];
    for (int i = 0; i < 2; i++) omega[i] <= om[i];
    @(posedge clk);
    in_valid <= 1'b0;
    t0 = 0;
    got = 0;
    while (got < 7) begin
      @(posedge clk);
      t0++;
      #1;
      if (out_valid) begin
        if (got == 0) check(t0 == 2 + 2, $sformatf("first value after %0d clocks", t0));
        check(out_pos == 3'(got), "positions in order");
        e[out_pos] = out_err;
        got++;
        if (got == 7) begin
          check(done, "done with position 6");
          flag = unc;
        end
      end
    end
    @(posedge clk);
  endtask

  sym_t err [7], e [7], lam [3], om [2], s [4], p [];
  bit flag;
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int w = 0; w < 150; w++) begin
      int ne, a, b;
      for (int i = 0; i < 7; i++) err[i] = 0;
      ne = w % 3;
      a = $urandom_range(0, 6);
      b = (a + $urandom_range(1, 6)) % 7;
      if (ne >= 1) err[a] = sym_t'($urandom_range(1, 7));
      if (ne >= 2) err[b] = sym_t'($urandom_range(1, 7));
      lam = '{3'b001, 3'b000, 3'b000};
      for (int i = 0; i < 7; i++)
        if (err[i] != 0) begin
          // lam <- lam * (1 + alpha^i x)
          lam[2] = lam[2] ^ r_mul(lam[1], r_exp(i));
          lam[1] = lam[1] ^ r_mul(lam[0], r_exp(i));
        end
      p = new[7];
      for (int i = 0; i < 7; i++) p[i] = err[i];
      for (int k = 1; k <= 4; k++) s[k-1] = r_eval(p, r_exp(k));
      om[0] = r_mul(lam[0], s[0]);
      om[1] = r_mul(lam[0], s[1]) ^ r_mul(lam[1], s[0]);
      run(lam, om, e, flag);
      check(e == err, $sformatf("error values, pattern %0d", w));
      check(!flag, "correctable pattern not flagged");
    end
    for (int w = 0; w < 60; w++) begin
      sym_t l [];
      int roots;
      l = new[3];
      for (int i = 0; i < 3; i++) lam[i] = sym_t'($urandom_range(0, 7));
      lam[0] = sym_t'($urandom_range(1, 7));
      lam[2] = sym_t'($urandom_range(1, 7));
      for (int i = 0; i < 3; i++) l[i] = lam[i];
      om = '{sym_t'($urandom_range(0, 7)), sym_t'($urandom_range(0, 7))};
      roots = 0;
      for (int i = 0; i < 7; i++) if (r_eval(l, r_exp(-i)) == 0) roots++;
      run(lam, om, e, flag);
      check(flag == (roots != 2), $sformatf("flag with %0d roots", roots));
      if (flag) n_unc++;
    end
    check(n_unc > 0, "some locators had too few roots");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
