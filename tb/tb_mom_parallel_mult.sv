// tb_mom_parallel_mult -- self-checking testbench of the parallel modified
// Massey-Omura multiplier in GF(16), all-one polynomial x^4 + x^3 + x^2 + x + 1.
//
// The matrix Q built inside the multiplier must equal the one printed for the
// GF(16) example. Then all 256 operand pairs are multiplied, one per clock,
// followed by 200 random pairs with idle clocks, and every product is
// compared, one clock after its operands, with a product formed here by
// cyclic-polynomial arithmetic: the normal-basis digit b_i is the coefficient
// of x^(2^i mod 5) modulo x^5 - 1, and 1 = a + a^2 + a^3 + a^4.
module tb_mom_parallel_mult;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [3:0] b = '0, c = '0, d;
  logic out_valid;
  int checks = 0, failures = 0;

  mom_parallel_mult dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [3:0] ref_mul(logic [3:0] x, logic [3:0] y);
    logic [4:0] px, py, pr;
    logic [3:0] r;
    int pw [4] = '{1, 2, 4, 3};          // 2^i mod 5
    px = '0; py = '0; pr = '0;
    for (int i = 0; i < 4; i++) begin px[pw[i]] = x[i]; py[pw[i]] = y[i]; end
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++)
        if (px[i] && py[j]) pr[(i + j) % 5] ^= 1'b1;
    if (pr[0]) pr = ~pr;
    for (int i = 0; i < 4; i++) r[i] = pr[pw[i]];
    return r;
  endfunction

  logic [3:0] exp_q [$];
  int n_got = 0;

  always @(posedge clk) begin
    #2;
    if (rst_n && out_valid) begin
      check(exp_q.size() > 0, "product without operands");
      if (exp_q.size() > 0) begin
        logic [3:0] e;
        e = exp_q.pop_front();
        check(d == e, $sformatf("product %b, expected %b", d, e));
        n_got++;
      end
    end
  end

  initial begin
    logic [3:0][3:0] qp;
    // printed Q, rows 0..3, column 0 first
    qp = {4'b0000, 4'b0100, 4'b0001, 4'b0010};
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        check(dut.Q[i][j] == qp[i][j], $sformatf("Q(%0d,%0d)", i, j));
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int p = 0; p < 256; p++) begin
      in_valid = 1'b1;
      b = 4'(p); c = 4'(p >> 4);
      exp_q.push_back(ref_mul(b, c));
      @(posedge clk); #1;
    end
    for (int p = 0; p < 200; p++) begin
      in_valid = ($urandom_range(0, 2) != 0);
      b = 4'($urandom_range(0, 15)); c = 4'($urandom_range(0, 15));
      if (in_valid) exp_q.push_back(ref_mul(b, c));
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
    repeat (3) @(posedge clk);
    check(exp_q.size() == 0, "every product delivered");
    check(n_got >= 256, "one product per clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
