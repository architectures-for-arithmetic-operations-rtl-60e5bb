// tb_rs_syndrome -- self-checking testbench of the systolic syndrome
// calculator: random words (with idle gaps) are sent highest power first and
// S_1..S_4 are compared with v(alpha^k) from the reference arithmetic. The
// worked example's syndromes S = (1, a^2, a^5, a^4) are checked first, and
// the result must become visible at the edge that takes the last symbol.
module tb_rs_syndrome;
  import gf_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  gf_t  in_sym = '0;
  gf_t  syn [4];

  rs_syndrome #(.N(7), .TWO_T(4)) dut (.clk, .rst_n, .in_valid, .in_sym, .out_valid, .syn);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

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

  task automatic send(input sym_t v [7], input bit gaps);
    sym_t vv [];
    vv = new[7];
    for (int i = 0; i < 7; i++) vv[i] = v[i];
    for (int i = 6; i >= 0; i--) begin
      if (gaps && $urandom_range(0, 2) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      in_sym   <= v[i];
      @(posedge clk);
      #1 check(out_valid == (i == 0), $sformatf("result only after the last symbol, i=%0d", i));
    end
    in_valid <= 1'b0;
    #1;
    check(out_valid, "result one clock after the last symbol");
    for (int k = 1; k <= 4; k++)
      check(syn[k-1] == r_eval(vv, r_exp(k)), $sformatf("S_%0d", k));
  endtask

  sym_t v [7];
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    v = '{r_exp(4), r_exp(6), 3'b000, r_exp(3), 3'b000, 3'b000, r_exp(4)};
    send(v, 1'b0);
    check(syn[0] == r_exp(0) && syn[1] == r_exp(2) && syn[2] == r_exp(5) && syn[3] == r_exp(4),
          "worked example syndromes");
    for (int w = 0; w < 200; w++) begin
      for (int i = 0; i < 7; i++) v[i] = sym_t'($urandom_range(0, 7));
      send(v, w % 2 == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
