// rs_syndrome -- systolic syndrome calculator of the RS decoder.
//
// TWO_T cells, cell k holding the argument alpha^k (k = 1..2t), receive the
// same received symbol each clock, highest-order symbol v_{n-1} first. Each
// cell evaluates the received polynomial at its argument by Horner's rule,
// so all 2t syndromes S_k = v(alpha^k) are complete together after N symbols.
// A counter frames the word: out_valid pulses for one clock, registered by the
// edge that takes the N-th symbol, while syn[] holds S_1..S_2t (syn[0] = S_1). Symbols may
// arrive with gaps (in_valid low). The cell structure and the argument values
// follow the thesis; the framing counter and the one-clock result strobe are
// this design's choice.
module rs_syndrome
  import gf_pkg::*;
#(
  parameter int unsigned N     = 7,   // code length in symbols
  parameter int unsigned TWO_T = 4    // number of syndromes, 2t
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  gf_t  in_sym,
  output logic out_valid,
  output gf_t  syn [TWO_T]
);
  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] cnt;
  logic          first;
  assign first = (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (cnt == CW'(N - 1));
      if (in_valid) cnt <= (cnt == CW'(N - 1)) ? '0 : cnt + 1'b1;
    end
  end

  for (genvar k = 0; k < TWO_T; k++) begin : g_cell
    rs_syndrome_cell #(.EXP(k + 1)) u_cell (
      .clk, .rst_n, .in_valid, .in_first(first), .in_sym, .acc(syn[k])
    );
  end
endmodule
