// fir_poly_mult -- multiplication of a polynomial by a fixed polynomial with a
// feed-forward shift register (FIR filter) over GF(2^3).
//
// b(x) = a(x) h(x), h(x) = h_R x^R + ... + h_0 fixed. The coefficients of a(x)
// enter high-order first, one per clock; the register keeps the last R
// inputs and the output is sum_j h_j a_(i+R-j), so the coefficient of
// x^(i+R) of the product leaves in the same clock in which the coefficient of
// x^i enters. After a_0, R further zero inputs flush the low-order product
// coefficients. The default h(x) = x^3 + a x + a^3 is the worked example.
//
// Interface and timing: in_valid shifts in in_sym; out_sym is combinational
// from in_sym and the register (valid while in_valid is high); clear empties
// the register (the storage starts at 0). Ports are this design's.
module fir_poly_mult
  import gf_pkg::*;
#(
  parameter int unsigned   R = 3,
  parameter logic [3*R+2:0] H = {3'b001, 3'b000, 3'b010, 3'b011}  // h_R .. h_0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_valid,
  input  gf_t  in_sym,
  output gf_t  out_sym
);
  gf_t d [R];                  // d[j-1] = input j clocks ago

  function automatic gf_t hc(int j);
    return H[3*j +: 3];
  endfunction

  always_comb begin
    out_sym = gf_mul(hc(int'(R)), in_sym);
    for (int j = 0; j < int'(R); j++) out_sym ^= gf_mul(hc(int'(R) - 1 - j), d[j]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(R); j++) d[j] <= '0;
    end else if (clear) begin
      for (int j = 0; j < int'(R); j++) d[j] <= '0;
    end else if (in_valid) begin
      d[0] <= in_sym;
      for (int j = 1; j < int'(R); j++) d[j] <= d[j-1];
    end
  end
endmodule
