// tb_gf2m_arith_top -- end-to-end testbench of gf2m_arith_top at its default
// parameters (RS(7,3) over GF(8), divider over GF(8), multipliers over
// GF(16)).
//
// All sixteen units run at the same time, each driven by its own thread:
//   decoder   codewords of g(x) = (x+a)(x+a^2)(x+a^3)(x+a^4) with 0, 1, 2 and
//             3-4 symbol errors; results against a brute-force nearest-
//             codeword search; uncorrectable words must be flagged or at
//             least not silently miscorrected into a non-codeword
//   encoder   messages whose codewords must vanish at a^0 .. a^3
//   divider   inversions (B = 1) and divisions, checked by multiplying back
//   MOM       normal-basis products (serial and parallel) against
//             cyclic-polynomial arithmetic
//   SISOS     products back to back and with gaps
//   PIPOS     one product per clock
//   LFSR enc  every other decoder word is encoded by the top's LFSR encoder
//             (message passed through, parity zeroes the word at a^1 .. a^4);
//             the bit-level encoder runs alongside and must match it
//   const     alpha-multiplier steps with pauses, against shift-and-reduce
//   FIR, div  a(x) h(x) from the FIR filter streamed into the LFSR divider;
//             product and remainder against reference arithmetic
//   pipelined encoder  pairs of words interleaved 2:1; each must be a
//             systematic codeword
//   two-input a1 h + a2 k against carry-less products
//   adders    serial (four clocks) and parallel (one clock) sums
// Every mechanism is counted: corrections with 0, 1 and 2 errors, flagged
// uncorrectable words, each reachable key-equation action (advance, reduce
// with delay, reduce with swap, null), encoded blocks, inversions, divisions,
// empty divider slots, the three kinds of multiplier results, LFSR encodings,
// alpha steps, FIR products, LFSR divisions, interleaved pipelined encodings
// two-input products and serial and parallel sums. A mechanism that
// never happened counts as a failure.
module tb_gf2m_arith_top;
  import gf_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned NPE = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // decoder
  logic dec_in_valid = 1'b0, dec_in_ready, dec_out_valid, dec_out_done, dec_out_uncorrectable;
  gf_t  dec_in_sym = '0, dec_out_sym;
  logic [2:0] dec_out_pos;
  kes_act_e   dec_kes_act [NPE];
  // encoder
  logic enc_start = 1'b0, enc_out_valid, enc_out_t;
  gf_t  enc_m_in = '0, enc_out_sym;
  // divider
  logic div_in_valid = 1'b0, div_in_ready, div_out_valid;
  logic [2:0] div_a = '0, div_b = '0, div_c;
  logic [3:0] div_g = '0;
  // MOM
  logic mom_in_valid = 1'b0, mom_in_ready, mom_b_in = 1'b0, mom_c_in = 1'b0;
  logic mom_out_valid, mom_d_out;
  // SISOS
  logic sis_start = 1'b0, sis_a_in = 1'b0, sis_g_in = 1'b0;
  logic [3:0] sis_b = '0;
  logic sis_out_valid, sis_out_first, sis_p_out;
  // PIPOS
  logic pip_in_valid = 1'b0, pip_out_valid;
  logic [3:0] pip_a = '0, pip_b = '0, pip_g = '0, pip_p;
  // constant multiplier
  logic cm_load = 1'b0, cm_step = 1'b0;
  logic [3:0] cm_beta = '0, cm_q;
  // FIR multiplier and LFSR divider
  logic fir_clear = 1'b0, fir_in_valid = 1'b0, pd_clear = 1'b0, pd_in_valid = 1'b0;
  gf_t fir_in_sym = '0, fir_out_sym, pd_in_sym = '0, pd_q_sym;
  gf_t pd_rem [4];
  // LFSR encoder
  logic le_in_valid = 1'b0, le_in_ready, le_out_valid, le_out_parity;
  gf_t le_in_sym = '0, le_out_sym;
  // pipelined LFSR encoder and two-input multiplier
  logic ple_in_valid = 1'b0, ple_in_ready, ple_out_valid, ple_out_parity;
  gf_t ple_in_sym = '0, ple_out_sym;
  logic be_in_valid = 1'b0, be_in_ready, be_out_valid, be_out_parity;
  gf_t be_in_sym = '0, be_out_sym;
  logic mpm_in_valid = 1'b0, mpm_out_valid;
  logic [3:0] mpm_b = '0, mpm_c = '0, mpm_d;
  logic add_load = 1'b0, add_start = 1'b0, add_s_busy, add_s_done, add_p_busy, add_p_done;
  logic [3:0] add_a = '0, add_b = '0, add_s_sum, add_p_sum;
  logic tim_clear = 1'b0, tim_in_valid = 1'b0, tim_a1_in = 1'b0, tim_a2_in = 1'b0, tim_out_b;

  gf2m_arith_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_corr [3];                 // words corrected with 0, 1, 2 errors
  int n_unc_flag = 0, n_enc = 0, n_inv = 0, n_div = 0, n_div_idle = 0;
  int n_mpm = 0, n_be = 0;
  int n_ple = 0, n_tim = 0, n_add_s = 0, n_add_p = 0;
  int n_le = 0, n_le_stall = 0, n_cm = 0, n_fir = 0, n_pd = 0;
  int n_mom = 0, n_sis_b2b = 0, n_sis_gap = 0, n_pip = 0;
  int n_act [5];
  initial begin
    n_corr = '{0, 0, 0};
    n_act  = '{0, 0, 0, 0, 0};
  end
  always @(posedge clk) if (rst_n && cyc > 2)
    for (int i = 0; i < int'(NPE); i++) n_act[int'(dec_kes_act[i])]++;
  always @(posedge clk) if (rst_n && div_in_ready && !div_in_valid) n_div_idle++;

  // shift-and-add product modulo a polynomial of degree W
  function automatic logic [7:0] polymul(logic [7:0] x, logic [7:0] y,
                                         logic [8:0] gp, int w);
    logic [8:0] acc, sh;
    acc = '0;
    sh  = {1'b0, x};
    for (int i = 0; i < w; i++) begin
      if (y[i]) acc ^= sh;
      sh = sh << 1;
      if (sh[w]) sh ^= gp;
    end
    return acc[7:0];
  endfunction

  // ---------------- decoder ----------------
  task automatic dec_word(input sym_t v [7], output sym_t c [7], output bit unc);
    int got;
    for (int i = 6; i >= 0; i--) begin
      while (!dec_in_ready) begin @(posedge clk); #1; end
      dec_in_valid = 1'b1;
      dec_in_sym   = v[i];
      @(posedge clk); #1;
    end
    dec_in_valid = 1'b0;
    got = 0;
    while (got < 7) begin
      if (dec_out_valid) begin
        c[dec_out_pos] = dec_out_sym;
        got++;
        if (got == 7) begin
          check(dec_out_done, "decoder done with the last symbol");
          unc = dec_out_uncorrectable;
        end
      end
      @(posedge clk); #1;
    end
  endtask

  // one message through the LFSR encoder; c[i] of x^i
  task automatic le_word(input sym_t m [3], output sym_t c [7]);
    int got;
    for (int i = 2; i >= 0; i--) begin
      while (!le_in_ready) begin n_le_stall++; @(posedge clk); #1; end
      le_in_valid = 1'b1;
      le_in_sym   = m[i];
      be_in_valid = 1'b1;
      be_in_sym   = m[i];
      @(posedge clk); #1;
      le_in_valid = 1'b0;
      be_in_valid = 1'b0;
      check(be_out_valid && be_out_sym == le_out_sym, "bit-level encoder matches");
      check(le_out_valid && !le_out_parity && le_out_sym == m[i], "LFSR encoder passes the message");
      c[4 + i] = le_out_sym;
    end
    for (int i = 3; i >= 0; i--) begin
      check(!le_in_ready, "LFSR encoder busy during parity");
      @(posedge clk); #1;
      check(le_out_valid && le_out_parity, "LFSR encoder parity symbol");
      check(be_out_valid && be_out_parity && be_out_sym == le_out_sym, "bit-level encoder parity matches");
      c[i] = le_out_sym;
    end
    for (int j = 1; j <= 4; j++) check(r_eval(c, r_exp(j)) == 0, "LFSR codeword vanishes at the roots");
    n_le++;
    n_be++;
  endtask

  task automatic run_decoder();
    sym_t m [3], v [7], c [7], ref_c [7];
    bit unc, ok;
    int nerr;
    for (int w = 0; w < 120; w++) begin
      for (int i = 0; i < 3; i++) m[i] = sym_t'($urandom_range(0, 7));
      // words alternate between the LFSR encoder of the top and m(x) g(x)
      if (w % 2 == 0) le_word(m, ref_c);
      else            r_encode_g(m, ref_c);
      v = ref_c;
      nerr = (w % 8 == 7) ? 3 + $urandom_range(0, 1) : w % 3;
      for (int e = 0, p = $urandom_range(0, 6); e < nerr; e++, p = (p + 2) % 7)
        v[p] = v[p] ^ sym_t'($urandom_range(1, 7));
      dec_word(v, c, unc);
      ok = r_decode(v, ref_c);
      if (ok) begin
        check(c == ref_c && !unc, $sformatf("decoder word %0d (%0d errors)", w, nerr));
        if (nerr <= 2 && c == ref_c) n_corr[nerr]++;
      end else if (unc) begin
        n_unc_flag++;
      end
    end
  endtask

  // ---------------- encoder ----------------
  sym_t enc_q [$];
  task automatic run_encoder();
    for (int b = 0; b < 60; b++) begin
      for (int c = 0; c < 7; c++) begin
        enc_start = (c == 0);
        enc_m_in  = (c < 3) ? sym_t'($urandom_range(0, 7)) : sym_t'(0);
        if (c < 3) enc_q.push_back(enc_m_in);
        @(posedge clk); #1;
      end
      enc_start = 1'b0;
      if (b % 5 == 4) begin repeat (2) @(posedge clk); #1; end
    end
  endtask
  int   enc_pos = 0;
  sym_t enc_word [];
  initial enc_word = new[7];
  always @(posedge clk) if (rst_n && enc_out_valid) begin
    enc_word[6 - enc_pos] = enc_out_sym;        // first symbol is x^6
    if (enc_pos < 3) check(enc_out_sym == enc_q.pop_front(), "encoder message symbol");
    enc_pos++;
    if (enc_pos == 7) begin
      bit ok;
      ok = 1'b1;
      for (int l = 0; l < 4; l++) if (r_eval(enc_word, r_exp(l)) != 0) ok = 1'b0;
      check(ok, "encoded block vanishes at a^0..a^3");
      n_enc++;
      enc_pos = 0;
    end
  end

  // ---------------- divider ----------------
  logic [2:0] div_qa [$], div_qb [$];
  task automatic run_divider();
    for (int i = 0; i < 100; i++) begin
      while (!div_in_ready) begin @(posedge clk); #1; end
      div_in_valid = 1'b1;
      div_a = 3'($urandom_range(1, 7));
      div_b = (i % 2 == 0) ? 3'b001 : 3'($urandom_range(0, 7));
      div_g = 4'b1011;
      div_qa.push_back(div_a);
      div_qb.push_back(div_b);
      @(posedge clk); #1;
      div_in_valid = 1'b0;
      if (i % 7 == 6) begin repeat (6) @(posedge clk); #1; end
    end
  endtask
  always @(posedge clk) if (rst_n && div_out_valid) begin
    logic [2:0] ea, eb;
    ea = div_qa.pop_front();
    eb = div_qb.pop_front();
    check(polymul(8'(div_c), 8'(ea), 9'b1011, 3) == 8'(eb), "divider quotient");
    if (eb == 3'b001) n_inv++; else n_div++;
  end

  // ---------------- MOM ----------------
  function automatic logic [3:0] mom_ref(logic [3:0] b, logic [3:0] c);
    logic [4:0] pb, pc, pr;
    logic [3:0] d;
    int pw [4] = '{1, 2, 4, 3};                 // 2^i mod 5
    pb = '0; pc = '0; pr = '0;
    for (int i = 0; i < 4; i++) begin pb[pw[i]] = b[i]; pc[pw[i]] = c[i]; end
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++)
        if (pb[i] && pc[j]) pr[(i + j) % 5] ^= 1'b1;
    if (pr[0]) pr = ~pr;
    for (int i = 0; i < 4; i++) d[i] = pr[pw[i]];
    return d;
  endfunction
  task automatic run_mom();
    logic [3:0] b, c, d;
    for (int p = 0; p < 80; p++) begin
      b = 4'($urandom); c = 4'($urandom);
      while (!mom_in_ready) begin @(posedge clk); #1; end
      for (int i = 0; i < 4; i++) begin
        mom_in_valid = 1'b1; mom_b_in = b[i]; mom_c_in = c[i];
        @(posedge clk); #1;
      end
      mom_in_valid = 1'b0;
      for (int k = 0; k < 4; k++) begin
        @(posedge clk); #1;
        check(mom_out_valid, "MOM digit valid");
        d[3 - k] = mom_d_out;
      end
      check(d == mom_ref(b, c), "MOM product");
      n_mom++;
    end
  endtask

  // ---------------- SISOS ----------------
  logic [3:0] sis_q [$];
  bit         sis_gapq [$];
  task automatic run_sisos();
    logic [3:0] a, b;
    logic [3:0] gl = 4'b0011;            // G = x^4 + x + 1 without x^4
    for (int n = 0; n < 100; n++) begin
      bit gap;
      gap = (n % 4 == 0);
      if (gap) begin repeat (3) @(posedge clk); #1; end
      a = 4'($urandom); b = 4'($urandom);
      sis_q.push_back(polymul(8'(a), 8'(b), 9'b10011, 4)[3:0]);
      sis_gapq.push_back(gap);
      for (int i = 3; i >= 0; i--) begin
        sis_start = (i == 3); sis_a_in = a[i]; sis_g_in = gl[i]; sis_b = b;
        @(posedge clk); #1;
      end
      sis_start = 1'b0; sis_a_in = 1'b0; sis_g_in = 1'b0;
    end
  endtask
  int sis_k = 0;
  logic [3:0] sis_got;
  always @(posedge clk) if (rst_n && sis_out_valid) begin
    if (sis_out_first) sis_k = 0;
    sis_got[3 - sis_k] = sis_p_out;
    sis_k++;
    if (sis_k == 4) begin
      check(sis_got == sis_q.pop_front(), "SISOS product");
      if (sis_gapq.pop_front()) n_sis_gap++; else n_sis_b2b++;
    end
  end

  // ---------------- PIPOS ----------------
  logic [3:0] pip_q [$];
  task automatic run_pipos();
    for (int n = 0; n < 200; n++) begin
      pip_in_valid = 1'b1;
      pip_a = 4'($urandom); pip_b = 4'($urandom); pip_g = 4'b1001;
      pip_q.push_back(polymul(8'(pip_a), 8'(pip_b), 9'b11001, 4)[3:0]);
      @(posedge clk); #1;
    end
    pip_in_valid = 1'b0;
  endtask
  always @(posedge clk) if (rst_n && pip_out_valid) begin
    check(pip_p == pip_q.pop_front(), "PIPOS product");
    n_pip++;
  end

  // ---------------- constant multiplier, FIR multiplier, LFSR divider ----------------
  task automatic run_poly();
    sym_t a [], b [], h [4], gq [5], w [];
    logic [3:0] x, e;
    // alpha^i * beta for i = 0..20 against shift-and-reduce by x^4 + x + 1
    for (int n = 0; n < 20; n++) begin
      x = 4'($urandom_range(1, 15));
      cm_load = 1'b1; cm_beta = x;
      @(posedge clk); #1;
      cm_load = 1'b0;
      e = x;
      for (int i = 0; i < 20; i++) begin
        cm_step = (i % 3 != 2);
        @(posedge clk); #1;
        if (cm_step) e = {e[2:0], 1'b0} ^ (e[3] ? 4'b0011 : 4'b0000);
        check(cm_q == e, "constant multiplier");
        n_cm += int'(cm_step);
      end
      cm_step = 1'b0;
    end
    h  = '{r_exp(3), r_exp(1), 3'b000, 3'b001};
    gq = '{r_exp(3), r_exp(1), 3'b001, r_exp(3), 3'b001};
    for (int n = 0; n < 40; n++) begin
      int k;
      k = $urandom_range(0, 3);
      a = new[k + 1];
      foreach (a[i]) a[i] = sym_t'($urandom_range(0, 7));
      b = new[k + 4];
      foreach (b[i]) b[i] = '0;
      for (int i = 0; i <= k; i++) for (int j = 0; j < 4; j++) b[i + j] ^= r_mul(a[i], h[j]);
      // a(x) h(x) through the FIR filter, each product coefficient straight into
      // the divider, plus one zero: the divider's remainder is x a(x) h(x) mod g(x)
      fir_clear = 1'b1; pd_clear = 1'b1;
      @(posedge clk); #1;
      fir_clear = 1'b0; pd_clear = 1'b0;
      w = new[k + 5];
      w[0] = '0;
      for (int t = 0; t <= k + 3; t++) begin
        fir_in_valid = 1'b1;
        fir_in_sym   = (t <= k) ? a[k - t] : sym_t'(0);
        #1 check(fir_out_sym == b[k + 3 - t], "FIR product coefficient");
        pd_in_valid = 1'b1;             // the product goes straight into the divider
        pd_in_sym   = fir_out_sym;
        w[k + 4 - t] = fir_out_sym;
        @(posedge clk); #1;
      end
      fir_in_valid = 1'b0;
      pd_in_sym = '0;                   // one more shift: divide x b(x)
      @(posedge clk); #1;
      pd_in_valid = 1'b0;
      n_fir++;
      // reference: x b(x) mod g(x)
      for (int d = k + 4; d >= 4; d--) begin
        sym_t q;
        q = w[d];
        for (int j = 0; j < 5; j++) w[d - 4 + j] ^= r_mul(q, gq[j]);
      end
      for (int i = 0; i < 4; i++) check(pd_rem[i] == w[i], "LFSR divider remainder");
      n_pd++;
    end
  endtask

  // ---------------- pipelined encoder, two-input multiplier ----------------
  task automatic run_ple();
    sym_t m [2][3], c [2][7], mm [3];
    for (int n = 0; n < 30; n++) begin
      for (int w = 0; w < 2; w++) for (int i = 0; i < 3; i++) m[w][i] = sym_t'($urandom_range(0, 7));
      for (int s = 2; s >= 0; s--)
        for (int w = 0; w < 2; w++) begin
          ple_in_valid = 1'b1;
          ple_in_sym   = m[w][s];
          @(posedge clk); #1;
          check(ple_out_valid && !ple_out_parity && ple_out_sym == m[w][s], "pipelined encoder passes the message");
          c[w][4 + s] = ple_out_sym;
        end
      ple_in_valid = 1'b0;
      for (int s = 3; s >= 0; s--)
        for (int w = 0; w < 2; w++) begin
          check(!ple_in_ready, "pipelined encoder busy during parity");
          @(posedge clk); #1;
          check(ple_out_valid && ple_out_parity, "pipelined encoder parity symbol");
          c[w][s] = ple_out_sym;
        end
      for (int w = 0; w < 2; w++) begin
        sym_t cw [7];
        cw = c[w];
        for (int j = 1; j <= 4; j++) check(r_eval(cw, r_exp(j)) == 0, "interleaved codeword vanishes at the roots");
        // the same message through the reference systematic encoder
        mm = m[w];
        check(cw[6] == mm[2] && cw[5] == mm[1] && cw[4] == mm[0], "interleaved codeword is systematic");
      end
      n_ple++;
    end
  endtask

  task automatic run_tim();
    logic [7:0] a1, a2;
    logic [15:0] b;
    for (int n = 0; n < 40; n++) begin
      a1 = 8'($urandom_range(0, 255));
      a2 = 8'($urandom_range(0, 255));
      b  = '0;
      for (int i = 0; i < 4; i++) begin
        if (((4'b1011 >> i) & 4'b1) != 0) b ^= 16'(a1) << i;
        if (((4'b0111 >> i) & 4'b1) != 0) b ^= 16'(a2) << i;
      end
      tim_clear = 1'b1;
      @(posedge clk); #1;
      tim_clear = 1'b0;
      for (int t = 0; t < 11; t++) begin
        tim_in_valid = 1'b1;
        tim_a1_in = (t < 8) ? a1[t] : 1'b0;
        tim_a2_in = (t < 8) ? a2[t] : 1'b0;
        #1 check(tim_out_b == b[t], "two-input multiplier coefficient");
        @(posedge clk); #1;
      end
      tim_in_valid = 1'b0;
      n_tim++;
    end
  endtask

  // ---------------- parallel Massey-Omura ----------------
  task automatic run_mpm();
    logic [3:0] x, y, prev;
    for (int k = 0; k < 60; k++) begin
      x = 4'($urandom_range(0, 15));
      y = 4'($urandom_range(0, 15));
      mpm_in_valid = 1'b1; mpm_b = x; mpm_c = y;
      prev = mom_ref(x, y);
      @(posedge clk); #1;
      mpm_in_valid = 1'b0;
      check(mpm_out_valid && mpm_d == prev, "parallel Massey-Omura product");
      n_mpm += int'(mpm_out_valid);
    end
  endtask

  // ---------------- adders ----------------
  task automatic run_add();
    logic [3:0] x, y;
    int n;
    for (int k = 0; k < 40; k++) begin
      x = 4'($urandom_range(0, 15));
      y = 4'($urandom_range(0, 15));
      add_load = 1'b1; add_a = x; add_b = y;
      @(posedge clk); #1;
      add_load = 1'b0; add_start = 1'b1;
      @(posedge clk); #1;
      add_start = 1'b0;
      check(add_p_done && add_p_sum == (x ^ y), "parallel adder");
      n_add_p += int'(add_p_done);
      n = 1;
      while (!add_s_done && n < 10) begin @(posedge clk); #1; n++; end
      check(n == 4 && add_s_sum == (x ^ y), "serial adder, four clocks");
      n_add_s += int'(add_s_done);
    end
  endtask

  // ---------------- run ----------------
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    fork
      run_decoder();
      run_encoder();
      run_divider();
      run_mom();
      run_sisos();
      run_pipos();
      run_poly();
      run_ple();
      run_tim();
      run_add();
      run_mpm();
    join
    repeat (40) @(posedge clk);
    check(enc_q.size() == 0 && div_qa.size() == 0 && sis_q.size() == 0 && pip_q.size() == 0,
          "every issued operation produced a result");
    $display("decoder: corrected %0d/%0d/%0d words with 0/1/2 errors, flagged %0d",
             n_corr[0], n_corr[1], n_corr[2], n_unc_flag);
    $display("key equation actions: null %0d advance %0d reduce-delay %0d reduce-swap %0d",
             n_act[KES_NULL], n_act[KES_ADVANCE], n_act[KES_REDUCE_DELAY], n_act[KES_REDUCE_SWAP]);
    $display("encoder %0d blocks; divider %0d inversions %0d divisions %0d idle slots",
             n_enc, n_inv, n_div, n_div_idle);
    $display("MOM %0d, SISOS %0d back-to-back %0d after a gap, PIPOS %0d",
             n_mom, n_sis_b2b, n_sis_gap, n_pip);
    $display("LFSR encoder %0d words (%0d stalled clocks); alpha steps %0d, FIR products %0d, divisions %0d",
             n_le, n_le_stall, n_cm, n_fir, n_pd);
    $display("pipelined encoder %0d interleaved pairs; two-input products %0d; sums %0d serial %0d parallel",
             n_ple, n_tim, n_add_s, n_add_p);
    $display("parallel Massey-Omura %0d", n_mpm);
    check(n_corr[0] > 0, "mechanism: error-free word");
    check(n_corr[1] > 0, "mechanism: single-error correction");
    check(n_corr[2] > 0, "mechanism: double-error correction");
    check(n_unc_flag > 0, "mechanism: uncorrectable word flagged");
    check(n_act[KES_NULL] > 0, "mechanism: key-equation null step");
    check(n_act[KES_ADVANCE] > 0, "mechanism: key-equation advance");
    check(n_act[KES_REDUCE_DELAY] > 0, "mechanism: key-equation reduce with delay");
    check(n_act[KES_REDUCE_SWAP] > 0, "mechanism: key-equation reduce with swap");
    check(n_enc == 60, "mechanism: Cauchy encoding");
    check(n_inv > 0, "mechanism: inversion");
    check(n_div > 0, "mechanism: division");
    check(n_div_idle > 0, "mechanism: empty divider slot");
    check(n_mom == 80, "mechanism: Massey-Omura product");
    check(n_sis_b2b > 0, "mechanism: SISOS back to back");
    check(n_sis_gap > 0, "mechanism: SISOS after a gap");
    check(n_pip == 200, "mechanism: PIPOS product per clock");
    check(n_le == 60, "mechanism: LFSR encoding into the decoder");
    check(n_cm > 0, "mechanism: constant multiplier step");
    check(n_fir == 40, "mechanism: FIR polynomial product");
    check(n_pd == 40, "mechanism: LFSR polynomial division");
    check(n_ple == 30, "mechanism: 2:1 interleaved pipelined encoding");
    check(n_tim == 40, "mechanism: two-input polynomial product");
    check(n_add_s == 40, "mechanism: serial addition");
    check(n_add_p == 40, "mechanism: parallel addition");
    check(n_mpm == 60, "mechanism: parallel Massey-Omura product");
    check(n_be == 60, "mechanism: bit-level encoding");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
