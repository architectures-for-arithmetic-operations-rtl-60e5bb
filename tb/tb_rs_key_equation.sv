// tb_rs_key_equation -- self-checking testbench of the key-equation solver.
//
// Builds error patterns of weight 0..2, computes their syndromes with the
// reference arithmetic and feeds one syndrome set per clock (the solver is
// fully pipelined). Each result must satisfy the key equation
// Lambda(x) S(x) = Omega(x) mod x^4, have deg Omega < 2 and Lambda(0) != 0,
// and vanish exactly at alpha^-i for the error positions i. The worked
// example must give Lambda = a x^2 + a^2 x + a^4 and Omega = x + a^4. The
// latency must be NPE + 1 clocks, and every reachable kind of PE action
// must occur.
module tb_rs_key_equation;
  import gf_pkg::*;
  import tb_ref_pkg::*;

  localparam int T = 2, NPE = 6, LAT = NPE + 1, NW = 400;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  gf_t  syn [4];
  gf_t  lambda [3];
  gf_t  omega [2];
  kes_act_e act [NPE];

  rs_key_equation #(.T(T), .NPE(NPE)) dut (.clk, .rst_n, .in_valid, .syn,
    .out_valid, .lambda, .omega, .act);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int act_count [5];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  sym_t err [NW][7];
  sym_t s_in [NW][4];

  initial begin
    // error patterns: word 0 is the worked example's e(x) = a^4 x^4 + a^3
    for (int w = 0; w < NW; w++) begin
      for (int i = 0; i < 7; i++) err[w][i] = 0;
      if (w == 0) begin
        err[w][0] = r_exp(3); err[w][4] = r_exp(4);
      end else begin
        int ne;
        ne = w % 3;
        for (int e = 0; e < ne; e++) err[w][$urandom_range(0, 6)] = sym_t'($urandom_range(1, 7));
      end
      for (int k = 1; k <= 4; k++) begin
        sym_t p [];
        p = new[7];
        for (int i = 0; i < 7; i++) p[i] = err[w][i];
        s_in[w][k-1] = r_eval(p, r_exp(k));
      end
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int w = 0; w < NW; w++) begin
      in_valid <= 1'b1;
      for (int k = 0; k < 4; k++) syn[k] <= s_in[w][k];
      @(posedge clk);
    end
    in_valid <= 1'b0;
  end

  // observe actions
  always @(posedge clk)
    if (rst_n && cyc > 2) for (int p = 0; p < NPE; p++) act_count[int'(act[p])]++;

  // checker: result w appears LAT clocks after it was presented
  int rx = 0, cyc = 0, first_in = -1, first_out = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && first_in < 0) first_in = cyc;
    if (rst_n && out_valid) begin
      sym_t lam [], om [], prod [8];
      if (first_out < 0) begin
        first_out = cyc;
        check(first_out - first_in == LAT, $sformatf("latency %0d", first_out - first_in));
      end
      lam = new[3]; om = new[2];
      for (int i = 0; i < 3; i++) lam[i] = lambda[i];
      for (int i = 0; i < 2; i++) om[i] = omega[i];
      for (int i = 0; i < 8; i++) prod[i] = 0;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 4; j++) prod[i+j] ^= r_mul(lam[i], s_in[rx][j]);
      check(prod[0] == om[0] && prod[1] == om[1] && prod[2] == 0 && prod[3] == 0,
            $sformatf("key equation, word %0d", rx));
      check(lam[0] != 0, "Lambda(0) non-zero");
      for (int i = 0; i < 7; i++)
        check((r_eval(lam, r_exp(-i)) == 0) == (err[rx][i] != 0),
              $sformatf("root at position %0d, word %0d", i, rx));
      if (rx == 0)
        check(lam[2] == r_exp(1) && lam[1] == r_exp(2) && lam[0] == r_exp(4) &&
              om[1] == 3'b001 && om[0] == r_exp(4), "worked example Lambda, Omega");
      rx++;
      if (rx == NW) begin
        // ADJUST needs both leading coefficients zero, which cannot happen
        // when f3 starts as x^2t: only the other four actions are required
        for (int a = 0; a < 5; a++)
          if (a != int'(KES_ADJUST))
            check(act_count[a] > 0, $sformatf("action %0d occurred", a));
        $display("actions null/adjust/advance/reduce-delay/reduce-swap: %0d %0d %0d %0d %0d",
                 act_count[0], act_count[1], act_count[2], act_count[3], act_count[4]);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
