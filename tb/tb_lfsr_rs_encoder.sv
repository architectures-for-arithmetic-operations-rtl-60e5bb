// tb_lfsr_rs_encoder -- self-checking testbench of the systematic RS(7,3)
// LFSR encoder.
//
// 300 random messages are sent, back to back or with random idle clocks
// between symbols. Each codeword that leaves must carry the message in its
// three highest positions, out_parity on exactly the last four symbols, equal
// the codeword worked out by long division by g(x) in the reference
// arithmetic, and vanish at alpha^1 .. alpha^4. in_ready must be low for
// exactly n - k = 4 clocks after the last message symbol is taken, and every
// output symbol must appear one clock after its input (or one clock after the
// previous parity symbol).
module tb_lfsr_rs_encoder;
  import gf_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic in_ready, out_valid, out_parity;
  gf_t  in_sym = '0, out_sym;
  int checks = 0, failures = 0;

  lfsr_rs_encoder dut (.*);

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

  localparam int NMSG = 300;
  sym_t msgs [NMSG][3];           // m[i] of x^i
  int   ready_low = 0;

  // codeword c[i] of x^i: x^4 m(x) + (x^4 m(x) mod g(x))
  function automatic void ref_cw(input sym_t m [3], output sym_t c [7]);
    sym_t gq [5], w [7], q;
    gq = '{r_exp(3), r_exp(1), 3'b001, r_exp(3), 3'b001};
    for (int i = 0; i < 7; i++) w[i] = (i >= 4) ? m[i-4] : sym_t'(0);
    for (int k = 6; k >= 4; k--) begin
      q = w[k];
      for (int j = 0; j < 5; j++) w[k-4+j] ^= r_mul(q, gq[j]);
    end
    for (int i = 0; i < 7; i++) c[i] = (i >= 4) ? m[i-4] : w[i];
  endfunction

  always @(posedge clk) if (rst_n && !in_ready) ready_low++;

  // driver
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < NMSG; n++) begin
      for (int i = 0; i < 3; i++) msgs[n][i] = sym_t'($urandom_range(0, 7));
      for (int s = 2; s >= 0; s--) begin
        if (n % 3 == 1) repeat ($urandom_range(0, 2)) begin
          in_valid = 1'b0;
          @(posedge clk); #1;
        end
        while (!in_ready) begin
          in_valid = 1'b0;
          @(posedge clk); #1;
        end
        in_valid = 1'b1;
        in_sym   = msgs[n][s];
        @(posedge clk); #1;
      end
      in_valid = 1'b0;
    end
  end

  // monitor
  initial begin
    sym_t got [7], exp_cw [7], m [3];
    int gap;
    @(posedge rst_n);
    for (int n = 0; n < NMSG; n++) begin
      for (int s = 6; s >= 0; s--) begin
        gap = 0;
        do begin
          @(posedge clk); #2;
          gap++;
        end while (!out_valid);
        if (s < 4) check(gap == 1, $sformatf("parity symbol %0d of word %0d came %0d clocks late", s, n, gap));
        check(out_parity == (s < 4), $sformatf("out_parity on symbol %0d of word %0d", s, n));
        got[s] = out_sym;
      end
      m = msgs[n];
      ref_cw(m, exp_cw);
      for (int i = 0; i < 7; i++)
        check(got[i] == exp_cw[i], $sformatf("word %0d symbol %0d = %0d, expected %0d", n, i, got[i], exp_cw[i]));
      for (int j = 1; j <= 4; j++)
        check(r_eval(got, r_exp(j)) == 0, $sformatf("word %0d does not vanish at alpha^%0d", n, j));
      // cross-check the reference against the non-systematic form m'(x) g(x)
      check(exp_cw[6] == m[2] && exp_cw[5] == m[1] && exp_cw[4] == m[0], "systematic positions");
    end
    repeat (3) @(posedge clk);
    check(ready_low == 4 * NMSG, $sformatf("in_ready low for %0d clocks, expected %0d", ready_low, 4 * NMSG));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
