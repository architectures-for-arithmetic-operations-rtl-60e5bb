// tb_two_input_mult -- self-checking testbench of the two-input GF(2)
// polynomial multiplier, h(x) = x^3 + x + 1, k(x) = x^2 + x + 1.
//
// First the worked example a1 = x^2 + x + 1, a2 = x^3 + x + 1: both products
// are equal, so every output coefficient is 0, and the register must pass
// through the printed states 000, 110, 101, 111, 000. Then 300 random input
// pairs of degree 0..7 are multiplied and every output coefficient, low-order
// first, is compared with carry-less products computed here.
module tb_two_input_mult;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  logic a1_in = 1'b0, a2_in = 1'b0, out_b;
  int checks = 0, failures = 0;

  two_input_mult dut (.*);

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

  function automatic logic [15:0] clmul(logic [7:0] a, logic [3:0] b);
    logic [15:0] acc;
    acc = '0;
    for (int i = 0; i < 4; i++) if (b[i]) acc ^= 16'(a) << i;
    return acc;
  endfunction

  // printed register states, first stage first, before each shift
  localparam logic [2:0] EX_ST [5] = '{3'b000, 3'b110, 3'b101, 3'b111, 3'b000};

  task automatic run(input logic [7:0] a1, input logic [7:0] a2, input int d, input bit ex);
    logic [15:0] b;
    b = clmul(a1, 4'b1011) ^ clmul(a2, 4'b0111);
    clear = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0;
    for (int t = 0; t <= d + 3; t++) begin
      in_valid = 1'b1;
      a1_in = (t <= d) ? a1[t] : 1'b0;
      a2_in = (t <= d) ? a2[t] : 1'b0;
      #1;
      if (ex && t < 5) check({dut.s[0], dut.s[1], dut.s[2]} == EX_ST[t],
                             $sformatf("worked example: state before shift %0d", t));
      check(out_b == b[t], $sformatf("coefficient of x^%0d = %0d, expected %0d", t, out_b, b[t]));
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    run(8'b0000_0111, 8'b0000_1011, 3, 1'b1);
    for (int n = 0; n < 300; n++) begin
      int d;
      d = $urandom_range(0, 7);
      run(8'($urandom_range(0, 255)) & 8'((1 << (d + 1)) - 1),
          8'($urandom_range(0, 255)) & 8'((1 << (d + 1)) - 1), d, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
