// rs_syndrome_cell -- one cell of the systolic syndrome calculator.
//
// The cell holds a hardwired argument alpha^EXP and an accumulator A. Every
// received symbol v is broadcast to all cells; the cell updates
// A <= A * alpha^EXP + v (Horner's rule), so after the last symbol v_0 the
// accumulator holds S_EXP = v(alpha^EXP). On the first symbol of a word the
// old contents are discarded (A <= v), which clears the accumulator without a
// separate cycle. One symbol per clock; the result is valid one clock after
// the last symbol has been sampled.
module rs_syndrome_cell
  import gf_pkg::*;
#(
  parameter int unsigned EXP = 1   // the cell evaluates at alpha^EXP
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,           // a received symbol is present
  input  logic in_first,           // it is v_{n-1}, the first of a word
  input  gf_t  in_sym,
  output gf_t  acc                 // running value, S_EXP after the word
);
  localparam gf_t ARG = gf_apow(int'(EXP));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        acc <= '0;
    else if (in_valid) acc <= (in_first ? gf_t'(0) : gf_mul(acc, ARG)) ^ in_sym;
  end
endmodule
