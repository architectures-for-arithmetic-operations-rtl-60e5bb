// rs_key_equation -- systolic key-equation solver of the RS decoder.
//
// Solves Lambda(x) S(x) = Omega(x) mod x^2t with the combined-action extended
// Euclidean algorithm (COMB_XARD). The syndromes S_1..S_2t form
// S(x) = S_1 + S_2 x + ... + S_2t x^(2t-1). The initial vectors are
// f = (f2, f3) = (0, x^2t) and g = (g2, g3) = (1, S(x)); f1 and g1 are not
// needed and are not carried. The start marker sits at x^2t, so
// decwina = deg f3 - t + 1 = t + 1, and gshift = 0.
//
// NPE processing elements (rs_kes_pe) follow in a pipeline, each applying one
// combined action. A completion stage then undoes the outstanding gshift
// (g <- g / x^gshift, decwina += gshift, swap f,g), shifts f3 down by
// decwini - decwina and divides f2 and f3 by the leading coefficient of f3,
// giving Lambda = f2 / L(f3) and Omega = f3 / L(f3). When f3 is zero (no
// errors) the division is skipped, leaving Lambda = 1 and Omega = 0.
//
// Timing: fully pipelined, NPE + 1 clocks from in_valid to out_valid, one
// new syndrome set accepted every clock. act[p] shows the action PE p took on
// the problem it held in the previous clock. The algorithm is the thesis's;
// the word-parallel PEs and the count NPE = 2(t+1) (every decwina decrement
// can be followed by at most one delay) are this design's choice.
module rs_key_equation
  import gf_pkg::*;
#(
  parameter int unsigned T   = 2,            // symbol errors corrected
  parameter int unsigned NPE = 2 * (T + 1)   // processing elements
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  gf_t      syn [2*T],                // S_1 .. S_2t
  output logic     out_valid,
  output gf_t      lambda [T+1],             // error locator, index = power
  output gf_t      omega  [T],               // error evaluator
  output kes_act_e act [NPE]
);
  localparam int unsigned KW    = 2 * T + 2;
  localparam int unsigned START = 2 * T;
  localparam int unsigned SW    = $clog2(2 * T + 4) + 2;
  localparam int DECWINI = int'(T) + 1;

  gf_t f2 [NPE+1][KW];
  gf_t f3 [NPE+1][KW];
  gf_t g2 [NPE+1][KW];
  gf_t g3 [NPE+1][KW];
  logic signed [SW-1:0] gs [NPE+1];
  logic signed [SW-1:0] dw [NPE+1];
  logic v [NPE+1];

  // initial vectors
  always_comb begin
    for (int i = 0; i < KW; i++) begin
      f2[0][i] = '0;
      f3[0][i] = (i == START) ? gf_t'(1) : gf_t'(0);
      g2[0][i] = (i == 0)     ? gf_t'(1) : gf_t'(0);
      g3[0][i] = (i < 2 * T)  ? syn[i]   : gf_t'(0);
    end
    gs[0] = '0;
    dw[0] = SW'(DECWINI);
    v[0]  = in_valid;
  end

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    rs_kes_pe #(.KW(KW), .START(START), .SW(SW)) u_pe (
      .clk, .rst_n,
      .valid_i(v[p]), .f2_i(f2[p]), .f3_i(f3[p]), .g2_i(g2[p]), .g3_i(g3[p]),
      .gshift_i(gs[p]), .decwina_i(dw[p]),
      .valid_o(v[p+1]), .f2_o(f2[p+1]), .f3_o(f3[p+1]), .g2_o(g2[p+1]),
      .g3_o(g3[p+1]), .gshift_o(gs[p+1]), .decwina_o(dw[p+1]), .act_o(act[p])
    );
  end

  // completion
  gf_t rf2 [KW], rf3 [KW];
  gf_t lead, linv;
  logic signed [SW-1:0] cdw;
  int unsigned sh;

  always_comb begin
    cdw = dw[NPE];
    rf2 = f2[NPE];
    rf3 = f3[NPE];
    if (gs[NPE] > 0) begin
      // g <- g / x^gshift, then swap: the result is the shifted g
      for (int i = 0; i < KW; i++) begin
        rf2[i] = (i + int'(gs[NPE]) < KW) ? g2[NPE][i + int'(gs[NPE])] : gf_t'(0);
        rf3[i] = (i + int'(gs[NPE]) < KW) ? g3[NPE][i + int'(gs[NPE])] : gf_t'(0);
      end
      cdw = dw[NPE] + gs[NPE];
    end
    // f3 was advanced too far by decwini - decwina
    sh = (DECWINI > int'(cdw)) ? unsigned'(DECWINI - int'(cdw)) : 0;
    for (int i = 0; i < KW; i++)
      rf3[i] = (i + sh < KW) ? rf3[i + sh] : gf_t'(0);
    lead = '0;
    for (int i = 0; i < KW; i++)
      if (rf3[i] != '0) lead = rf3[i];
    linv = (lead == '0) ? gf_t'(1) : gf_inv(lead);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i <= T; i++) lambda[i] <= '0;
      for (int i = 0; i < T; i++)  omega[i]  <= '0;
    end else begin
      out_valid <= v[NPE];
      for (int i = 0; i <= T; i++) lambda[i] <= gf_mul(rf2[i], linv);
      for (int i = 0; i < T; i++)  omega[i]  <= gf_mul(rf3[i], linv);
    end
  end
endmodule
