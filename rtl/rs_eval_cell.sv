// rs_eval_cell -- one cell of the systolic polynomial evaluator.
//
// The cell holds one polynomial coefficient a_j, loaded while load is high.
// Each clock it registers the arriving partial sum A and argument x and
// presents A_out = A * x + a_j and x_out = x: one step of Horner's rule.
// A chain of cells holding a_n .. a_0, with A = 0 entering the first, gives
// p(x) at the last cell's output after n + 1 clocks; a new argument can enter
// every clock. A valid tag and an index ride along with x.
module rs_eval_cell
  import gf_pkg::*;
#(
  parameter int unsigned IW = 3           // width of the index tag
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,             // capture coef_i
  input  gf_t           coef_i,
  input  logic          v_i,
  input  logic [IW-1:0] idx_i,
  input  gf_t           a_i,
  input  gf_t           x_i,
  output logic          v_o,
  output logic [IW-1:0] idx_o,
  output gf_t           a_o,
  output gf_t           x_o
);
  gf_t coef, a_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coef  <= '0;
      a_q   <= '0;
      x_o   <= '0;
      v_o   <= 1'b0;
      idx_o <= '0;
    end else begin
      if (load) coef <= coef_i;
      a_q   <= a_i;
      x_o   <= x_i;
      v_o   <= v_i;
      idx_o <= idx_i;
    end
  end

  assign a_o = gf_mul(a_q, x_o) ^ coef;
endmodule
