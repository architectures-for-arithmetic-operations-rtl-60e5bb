// tb_cauchy_encoder -- self-checking testbench of the systolic Cauchy encoder.
//
// Encodes the three unit messages and random messages, back to back and with
// idle gaps. Each codeword (v_0 = coefficient of x^6 first) must start with
// the message and have the roots alpha^0 .. alpha^3 (a = 1); the check
// symbols are found by exhaustive search over all 4096 candidates. For the
// unit messages the check symbols must also equal the rows of the thesis's
// systematic generator matrix in the columns w_0, w_1 and w_3. The first
// output symbol must appear R + 1 clocks after the edge that takes start.
module tb_cauchy_encoder;
  import gf_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 7, K = 3, R = 4;

  logic clk = 0, rst_n = 0, start = 0;
  gf_t  m_in = '0;
  logic out_valid, out_t;
  gf_t  out_sym;

  cauchy_encoder #(.N(N), .K(K), .A_EXP(1)) dut (.clk, .rst_n, .start, .m_in,
    .out_valid, .out_sym, .out_t);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

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

  // reference: check symbols making v(x) vanish at alpha^0..alpha^3
  function automatic void ref_checks(input sym_t m [3], output sym_t w [4]);
    sym_t p [];
    p = new[7];
    for (int c = 0; c < 4096; c++) begin
      bit ok;
      for (int i = 0; i < 3; i++) p[6 - i] = m[i];
      for (int j = 0; j < 4; j++) p[3 - j] = sym_t'((c >> (3 * j)) & 7);
      ok = 1;
      for (int l = 0; l < 4; l++) if (r_eval(p, r_exp(l)) != 0) ok = 0;
      if (ok) begin
        for (int j = 0; j < 4; j++) w[j] = p[3 - j];
        return;
      end
    end
  endfunction

  localparam int NB = 40;
  sym_t msg [NB][3];
  int   gap [NB];

  // driver
  initial begin
    for (int b = 0; b < NB; b++) begin
      for (int i = 0; i < 3; i++)
        msg[b][i] = (b < 3) ? sym_t'(b == i) : sym_t'($urandom_range(0, 7));
      gap[b] = (b % 4 == 3) ? $urandom_range(1, 3) : 0;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < NB; b++) begin
      for (int c = 0; c < N; c++) begin
        start <= (c == 0);
        m_in  <= (c < K) ? msg[b][c] : sym_t'($urandom_range(0, 7));
        @(posedge clk);
      end
      for (int g = 0; g < gap[b]; g++) begin
        start <= 1'b0;
        @(posedge clk);
      end
    end
  end

  // monitor
  int cyc = 0, last_start = 0, blk = 0, pos = 0;
  sym_t got [7];
  sym_t w [4];
  sym_t gsys [3][4];
  initial gsys = '{'{r_exp(1), r_exp(3), 3'b0, r_exp(6)},
                   '{3'b001, r_exp(4), 3'b0, r_exp(1)},
                   '{r_exp(2), r_exp(5), 3'b0, r_exp(6)}};
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && start) last_start = cyc;
    if (rst_n && out_valid) begin
      if (pos == 0) check(cyc - last_start == R + 1, $sformatf("latency %0d", cyc - last_start));
      check(out_t == (pos < K), "timing signal");
      got[pos] = out_sym;
      pos++;
      if (pos == N) begin
        ref_checks(msg[blk], w);
        for (int i = 0; i < 3; i++) check(got[i] == msg[blk][i], $sformatf("block %0d message %0d", blk, i));
        for (int j = 0; j < 4; j++) check(got[3 + j] == w[j], $sformatf("block %0d w_%0d", blk, j));
        if (blk < 3)
          for (int j = 0; j < 4; j++)
            if (j != 2) check(got[3 + j] == gsys[blk][j], $sformatf("G_sys row %0d col w_%0d", blk, j));
        pos = 0;
        blk++;
        if (blk == NB) begin
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule
