// rs_alpha_inv_lfsr -- generator of 1, alpha^-1, alpha^-2, ... in GF(8).
//
// A three-stage shift register whose stages carry the coefficients of
// alpha^2, alpha and 1. On each enabled clock the alpha^2 stage takes the
// value leaving the "1" stage, the alpha stage takes the alpha^2 stage, and
// the "1" stage takes the sum of the alpha stage and the fed-back bit. With
// F(z) = z^3 + z + 1 this multiplies the contents by alpha^-1 = alpha^2 + 1,
// so after init the register steps through alpha^-i, i = 0, 1, ... The stage
// order, the feedback to the first stage and the adder in front of the "1"
// stage are those of the generator drawn in the thesis for this field.
module rs_alpha_inv_lfsr
  import gf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic init,     // load 1 (alpha^0)
  input  logic step,     // multiply by alpha^-1
  output gf_t  x         // x[2] = alpha^2 stage, x[1] = alpha, x[0] = 1
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    x <= gf_t'(1);
    else if (init) x <= gf_t'(1);
    else if (step) x <= {x[0], x[2], x[1] ^ x[0]};
  end
endmodule
