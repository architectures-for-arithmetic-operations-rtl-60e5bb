// two_input_mult -- two-input polynomial multiplier over GF(2):
// b(x) = a1(x) h(x) + a2(x) k(x) for fixed h(x) and k(x) of degree <= R.
//
// Transposed (shift-register) form: the inputs enter low-order first, one
// coefficient of each per clock, and every stage adds both inputs weighted by
// the tap bits before passing on:
//   s_0 <= h_R a1 + k_R a2,  s_i <= s_{i-1} + h_{R-i} a1 + k_{R-i} a2,
//   b    = s_{R-1} + h_0 a1 + k_0 a2   (combinational).
// The coefficient of x^(r+i) leaves in the clock in which the coefficients
// of x^i go in, so the product of inputs of degree <= d is complete after
// d + R + 1 clocks, the last R of them with zero inputs.
//
// Interface: clear zeroes the register; in_valid shifts a1_in/a2_in in;
// out_b is the product coefficient of the current clock. The defaults are
// the thesis's example h(x) = x^3 + x + 1, k(x) = x^2 + x + 1; the stage
// order and taps follow that circuit. The clear/in_valid controls are this
// design's own.
module two_input_mult #(
  parameter int unsigned  R  = 3,
  parameter logic [R:0]   HP = 4'b1011,   // h_R .. h_0: x^3 + x + 1
  parameter logic [R:0]   KP = 4'b0111    // k_R .. k_0: x^2 + x + 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_valid,
  input  logic a1_in,
  input  logic a2_in,
  output logic out_b
);
  logic [R-1:0] s;

  assign out_b = s[R-1] ^ (HP[0] & a1_in) ^ (KP[0] & a2_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= '0;
    end else if (clear) begin
      s <= '0;
    end else if (in_valid) begin
      s[0] <= (HP[R] & a1_in) ^ (KP[R] & a2_in);
      for (int i = 1; i < int'(R); i++)
        s[i] <= s[i-1] ^ (HP[R-i] & a1_in) ^ (KP[R-i] & a2_in);
    end
  end
endmodule
