// tb_pipelined_lfsr_encoder -- self-checking testbench of the pipelined
// (2:1 interleaved) RS(7,3) LFSR encoder.
//
// 200 pairs of random messages are sent interleaved, back to back or with
// idle clocks. The 14 output symbols of each pair are split into the two
// words, and each must equal the systematic codeword worked out by long
// division by g(x) here and vanish at alpha^1 .. alpha^4. out_parity must
// mark exactly the last 8 symbols, and in_ready must be low for 8 clocks
// per pair.
module tb_pipelined_lfsr_encoder;
  import gf_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic in_ready, out_valid, out_parity;
  gf_t  in_sym = '0, out_sym;
  int checks = 0, failures = 0;

  pipelined_lfsr_encoder dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int NP = 200;
  sym_t msgs [NP][2][3];
  int   ready_low = 0;

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

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < NP; n++) begin
      for (int w = 0; w < 2; w++)
        for (int i = 0; i < 3; i++) msgs[n][w][i] = sym_t'($urandom_range(0, 7));
      for (int s = 2; s >= 0; s--)
        for (int w = 0; w < 2; w++) begin
          if (n % 4 == 1) repeat ($urandom_range(0, 2)) begin
            in_valid = 1'b0;
            @(posedge clk); #1;
          end
          while (!in_ready) begin
            in_valid = 1'b0;
            @(posedge clk); #1;
          end
          in_valid = 1'b1;
          in_sym   = msgs[n][w][s];
          @(posedge clk); #1;
        end
      in_valid = 1'b0;
    end
  end

  initial begin
    sym_t got [2][7], exp_cw [7], g [7], m [3];
    @(posedge rst_n);
    for (int n = 0; n < NP; n++) begin
      for (int s = 6; s >= 0; s--)
        for (int w = 0; w < 2; w++) begin
          do begin
            @(posedge clk); #2;
          end while (!out_valid);
          check(out_parity == (s < 4), $sformatf("out_parity, pair %0d symbol %0d", n, s));
          got[w][s] = out_sym;
        end
      for (int w = 0; w < 2; w++) begin
        m = msgs[n][w];
        g = got[w];
        ref_cw(m, exp_cw);
        for (int i = 0; i < 7; i++)
          check(g[i] == exp_cw[i], $sformatf("pair %0d word %0d symbol %0d = %0d, expected %0d",
                                             n, w, i, g[i], exp_cw[i]));
        for (int j = 1; j <= 4; j++)
          check(r_eval(g, r_exp(j)) == 0, $sformatf("pair %0d word %0d not zero at alpha^%0d", n, w, j));
      end
    end
    repeat (3) @(posedge clk);
    check(ready_low == 8 * NP, $sformatf("in_ready low for %0d clocks, expected %0d", ready_low, 8 * NP));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
