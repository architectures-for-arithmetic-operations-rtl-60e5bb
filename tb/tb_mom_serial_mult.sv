// tb_mom_serial_mult -- self-checking testbench of the serial Massey-Omura
// multiplier, GF(2^4) with the all-one polynomial x^4 + x^3 + x^2 + x + 1.
//
// Every one of the 256 operand pairs is loaded bit-serially and the four
// product digits, which leave most significant coordinate first, are compared
// with a reference that works independently of the multiplication matrices:
// a normal-basis element sum b_i a^(2^i) is written as a polynomial in a
// modulo a^(m+1) = 1, the polynomials are multiplied cyclically, the result
// is reduced using 1 + a + ... + a^m = 0 and read back in the normal basis.
// The testbench also checks that the first digit appears one clock after the
// last input bit and that a product takes 2m clocks.
module tb_mom_serial_mult;
  localparam int unsigned M = 4;
  localparam int unsigned R = M + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, b_in = 1'b0, c_in = 1'b0;
  logic in_ready, out_valid, d_out;
  int checks = 0, failures = 0, cyc = 0;

  mom_serial_mult #(.M(M)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pw2(int i);   // 2^i mod (m + 1)
    int v = 1;
    for (int k = 0; k < i; k++) v = (2 * v) % int'(R);
    return v;
  endfunction

  function automatic logic [M-1:0] ref_mul(logic [M-1:0] b, logic [M-1:0] c);
    logic [R-1:0] pb, pc, pr;
    logic [M-1:0] d;
    pb = '0; pc = '0; pr = '0;
    for (int i = 0; i < int'(M); i++) begin
      pb[pw2(i)] = b[i];
      pc[pw2(i)] = c[i];
    end
    for (int i = 0; i < int'(R); i++)
      for (int j = 0; j < int'(R); j++)
        if (pb[i] && pc[j]) pr[(i + j) % int'(R)] ^= 1'b1;
    if (pr[0]) pr = ~pr;                 // 1 = a + a^2 + ... + a^m
    for (int i = 0; i < int'(M); i++) d[i] = pr[pw2(i)];
    return d;
  endfunction

  initial begin
    logic [M-1:0] b, c, exp_d, got;
    int t_last;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int p = 0; p < (1 << (2 * M)); p++) begin
      b = M'(p); c = M'(p >> M);
      exp_d = ref_mul(b, c);
      checks++;
      if (!in_ready) begin failures++; $display("FAIL not ready for pair %0d", p); end
      for (int i = 0; i < int'(M); i++) begin
        in_valid = 1'b1; b_in = b[i]; c_in = c[i];
        @(posedge clk); #1;
      end
      t_last = cyc;
      in_valid = 1'b0;
      for (int k = 0; k < int'(M); k++) begin
        @(posedge clk); #1;
        checks++;
        if (!out_valid) begin
          failures++;
          $display("FAIL out_valid low %0d clocks after the last bit", k + 1);
        end
        got[M-1-k] = d_out;
      end
      checks++;
      if (got !== exp_d) begin
        failures++;
        $display("FAIL b=%b c=%b: d=%b, expected %b", b, c, got, exp_d);
      end
      checks++;
      if (!in_ready || cyc - t_last != int'(M)) begin
        failures++;
        $display("FAIL framing after pair %0d", p);
      end
    end
    // worked check: a * a = a^2, i.e. [1000] * [1000] = [0100]
    checks++;
    if (ref_mul(4'b0001, 4'b0001) !== 4'b0010) begin
      failures++;
      $display("FAIL reference squaring");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
