// poly_divider -- division of a polynomial by a fixed monic polynomial with a
// linear feedback shift register over GF(2^3) (type 1 circuit).
//
// g(x) = x^R + g_{R-1} x^{R-1} + ... + g_0. The dividend enters high-order
// first. The feedback is the content of the last stage: each clock
//   s_0 <= d_in + g_0 s_{R-1},   s_i <= s_{i-1} + g_i s_{R-1}  (i >= 1).
// The feedback value is the next quotient coefficient (0 for the first R
// inputs), and after the last dividend coefficient the stages hold the
// remainder, s_i the coefficient of x^i. The default g(x) = x^4 + a^3 x^3 +
// x^2 + a x + a^3 is the worked example's.
//
// Interface and timing: in_valid shifts in in_sym; q_sym shows the quotient
// coefficient produced by that shift (combinational); rem is the register.
// clear empties the register (the stages start at 0). Ports are this
// design's.
module poly_divider
  import gf_pkg::*;
#(
  parameter int unsigned    R = 4,
  parameter logic [3*R-1:0] G = {3'b011, 3'b001, 3'b010, 3'b011}  // g_{R-1} .. g_0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_valid,
  input  gf_t  in_sym,
  output gf_t  q_sym,
  output gf_t  rem [R]
);
  function automatic gf_t gc(int i);
    return G[3*i +: 3];
  endfunction

  assign q_sym = rem[R-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(R); i++) rem[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < int'(R); i++) rem[i] <= '0;
    end else if (in_valid) begin
      rem[0] <= in_sym ^ gf_mul(gc(0), rem[R-1]);
      for (int i = 1; i < int'(R); i++) rem[i] <= rem[i-1] ^ gf_mul(gc(i), rem[R-1]);
    end
  end
endmodule
