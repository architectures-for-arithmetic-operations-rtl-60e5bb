// tb_gf_adder -- self-checking testbench of the serial and parallel GF(2^4)
// adders.
//
// Both forms add the worked example alpha^7 + alpha^13 = (1101) + (1011) =
// (0110) = alpha^5 (vectors printed b0 b1 b2 b3), with the powers taken from
// an exponent table built here, and then all 256 pairs against coefficient-
// wise addition mod 2. The serial sum must be complete m = 4 clocks, and the
// parallel sum 1 clock, after the clock that takes start, and the serial form
// must leave both addends in their registers.
module tb_gf_adder;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, start = 1'b0;
  logic [3:0] a = '0, b = '0, sum_s, sum_p;
  logic busy_s, busy_p, done_s, done_p;
  int checks = 0, failures = 0;

  gf_adder #(.SERIAL(1'b1)) dut_s (.clk, .rst_n, .load, .a, .b, .start,
                                   .busy(busy_s), .done(done_s), .sum(sum_s));
  gf_adder #(.SERIAL(1'b0)) dut_p (.clk, .rst_n, .load, .a, .b, .start,
                                   .busy(busy_p), .done(done_p), .sum(sum_p));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // alpha^e in GF(16), x^4 + x + 1
  logic [3:0] pw [15];
  initial begin
    pw[0] = 4'b0001;
    for (int i = 1; i < 15; i++) pw[i] = {pw[i-1][2:0], 1'b0} ^ (pw[i-1][3] ? 4'b0011 : 4'b0000);
  end
  function automatic logic [3:0] ref_sum(logic [3:0] x, logic [3:0] y);
    logic [3:0] r;
    // coefficient by coefficient: 1 where exactly one addend has the power
    r = '0;
    for (int i = 0; i < 4; i++) r[i] = (x[i] != y[i]);
    return r;
  endfunction

  task automatic add(input logic [3:0] x, input logic [3:0] y);
    int n;
    load = 1'b1; a = x; b = y;
    @(posedge clk); #1;
    load = 1'b0; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    check(done_p && sum_p == ref_sum(x, y), $sformatf("parallel %b + %b = %b", x, y, sum_p));
    n = 1;
    while (!done_s && n < 10) begin @(posedge clk); #1; n++; end
    check(n == 4, $sformatf("serial sum took %0d clocks", n));
    check(sum_s == ref_sum(x, y), $sformatf("serial %b + %b = %b", x, y, sum_s));
    check(dut_s.ra == x && dut_s.rb == y, "addends back in their registers");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // worked example, vectors (b0 b1 b2 b3): 1101 and 1011 -> 0110
    check(pw[7] == 4'b1011 && pw[13] == 4'b1101, "reference tables: alpha^7, alpha^13");
    add(pw[7], pw[13]);
    check(sum_s == pw[5] && sum_p == pw[5], "alpha^7 + alpha^13 = alpha^5");
    for (int v = 0; v < 256; v++) add(4'(v), 4'(v >> 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
