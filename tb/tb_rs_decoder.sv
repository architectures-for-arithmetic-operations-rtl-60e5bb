// tb_rs_decoder -- self-checking testbench of the RS(7,3) decoder.
//
// Sends the worked example word v(x) = a^4 x^6 + a^3 x^3 + a^6 x + a^4 and
// then random codewords of g(x) with 0, 1 or 2 random symbol errors, plus
// some words with 3 or more errors. Corrected words are compared with a
// brute-force nearest-codeword search; the latency from the last input
// symbol to the first output symbol is checked against NPE + T + 4 clocks.
module tb_rs_decoder;
  import gf_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 7, T = 2, NPE = 2 * (T + 1);
  localparam int LAT = NPE + T + 4;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  gf_t  in_sym = '0;
  logic out_valid, out_done, out_unc;
  logic [2:0] out_pos;
  gf_t  out_sym;
  kes_act_e kes_act [NPE];

  rs_decoder #(.N(N), .T(T), .NPE(NPE)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_sym, .out_valid, .out_pos,
    .out_sym, .out_done, .out_uncorrectable(out_unc), .kes_act);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // send v (v[i] = coefficient of x^i) highest power first, collect output
  task automatic run_word(input sym_t v [7], output sym_t c [7], output bit unc,
                          output int lat);
    int last_in, first_out, got;
    for (int i = N - 1; i >= 0; i--) begin
      in_valid <= 1'b1;
      in_sym   <= v[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0;
    got = 0;
    first_out = -1;
    last_in = 0;
    while (got < N) begin
      @(posedge clk);
      last_in++;
      #1;
      if (out_valid) begin
        if (first_out < 0) first_out = last_in;
        c[out_pos] = out_sym;
        got++;
        if (got == N) begin
          check(out_done, "done with the last symbol");
          unc = out_unc;
        end
      end
    end
    lat = first_out;
  endtask

  sym_t v [7], c [7], ref_c [7], m [3];
  bit unc, ok;
  int lat, nerr, n_unc;

  initial begin
    n_unc = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // worked example
    v = '{r_exp(4), r_exp(6), 3'b000, r_exp(3), 3'b000, 3'b000, r_exp(4)};
    run_word(v, c, unc, lat);
    ref_c = '{r_exp(6), r_exp(6), 3'b000, r_exp(3), r_exp(4), 3'b000, r_exp(4)};
    check(c == ref_c, "worked example corrected word");
    check(!unc, "worked example correctable");
    check(lat == LAT, $sformatf("latency %0d expected %0d", lat, LAT));

    for (int w = 0; w < 300; w++) begin
      for (int i = 0; i < 3; i++) m[i] = sym_t'($urandom_range(0, 7));
      r_encode_g(m, ref_c);
      v = ref_c;
      nerr = (w % 10 == 9) ? 3 + $urandom_range(0, 1) : $urandom_range(0, 2);
      for (int e = 0; e < nerr; e++) begin
        int p;
        p = $urandom_range(0, 6);
        v[p] = v[p] ^ sym_t'($urandom_range(1, 7));
      end
      run_word(v, c, unc, lat);
      ok = r_decode(v, ref_c);
      if (ok) begin
        check(c == ref_c, $sformatf("word %0d corrected", w));
        check(!unc, $sformatf("word %0d not flagged", w));
      end else begin
        if (unc) n_unc++;
      end
      check(lat == LAT, "latency");
    end
    check(n_unc > 0, "uncorrectable words were flagged");
    $display("flagged uncorrectable words: %0d", n_unc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
