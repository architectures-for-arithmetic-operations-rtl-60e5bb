// rs_kes_pe -- one processing element of the key-equation solver.
//
// The PE carries the polynomials f2, f3, g2, g3 of the combined-action
// extended Euclidean algorithm (COMB_XARD) as coefficient vectors of KW
// symbols (index = power of x) together with the counters gshift and
// decwina, and performs one combined action per problem:
//   decwina <= 0            NULL          pass everything unchanged
//   L'(f3)=0, L'(g3)=0      ADJUST        f3 <- x f3, g3 <- x g3, decwina-1
//   L'(f3)!=0, L'(g3)=0     ADVANCE       g <- x g, gshift+1, decwina-1
//   L'(g3)!=0, gshift>0     REDUCE+DELAY  f <- L'(g3) f - L'(f3) g, then
//                                         f3 <- x f3, g2 <- g2 / x, gshift-1
//   L'(g3)!=0, gshift=0     REDUCE+SWAP   f <- L'(g3) f - L'(f3) g, swap f,g,
//                                         g <- x g, gshift+1, decwina-1
// L'(p) is the coefficient aligned with the start marker, which in this
// word-parallel form is the fixed position START = 2t. In the thesis the
// cell is bit/symbol serial and realises x-multiplication as a relative
// delay of the streams; here a whole problem enters in one clock and the
// shifts are index moves, so the PE has one clock of latency and accepts a
// new problem every clock. The action taken is registered on act_o.
module rs_kes_pe
  import gf_pkg::*;
#(
  parameter int unsigned KW    = 6,   // coefficients carried per polynomial
  parameter int unsigned START = 4,   // position of the start marker, 2t
  parameter int unsigned SW    = 5    // width of the signed counters
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            valid_i,
  input  gf_t             f2_i [KW],
  input  gf_t             f3_i [KW],
  input  gf_t             g2_i [KW],
  input  gf_t             g3_i [KW],
  input  logic signed [SW-1:0] gshift_i,
  input  logic signed [SW-1:0] decwina_i,
  output logic            valid_o,
  output gf_t             f2_o [KW],
  output gf_t             f3_o [KW],
  output gf_t             g2_o [KW],
  output gf_t             g3_o [KW],
  output logic signed [SW-1:0] gshift_o,
  output logic signed [SW-1:0] decwina_o,
  output kes_act_e        act_o
);
  gf_t nf2 [KW], nf3 [KW], ng2 [KW], ng3 [KW];
  gf_t rf2 [KW], rf3 [KW];
  logic signed [SW-1:0] ngs, ndw;
  kes_act_e act;
  gf_t lf, lg;

  assign lf = f3_i[START];
  assign lg = g3_i[START];

  always_comb begin
    nf2 = f2_i; nf3 = f3_i; ng2 = g2_i; ng3 = g3_i;
    ngs = gshift_i; ndw = decwina_i;
    act = KES_NULL;
    // reduction f <- L'(g3) f - L'(f3) g (subtraction is XOR)
    for (int i = 0; i < KW; i++) begin
      rf2[i] = gf_mul(lg, f2_i[i]) ^ gf_mul(lf, g2_i[i]);
      rf3[i] = gf_mul(lg, f3_i[i]) ^ gf_mul(lf, g3_i[i]);
    end
    if (decwina_i > 0) begin
      if (lf == '0 && lg == '0) begin
        act = KES_ADJUST;
        for (int i = 0; i < KW; i++) begin
          nf3[i] = (i == 0) ? gf_t'(0) : f3_i[i-1];
          ng3[i] = (i == 0) ? gf_t'(0) : g3_i[i-1];
        end
        ndw = decwina_i - 1'b1;
      end else if (lg == '0) begin
        act = KES_ADVANCE;
        for (int i = 0; i < KW; i++) begin
          ng2[i] = (i == 0) ? gf_t'(0) : g2_i[i-1];
          ng3[i] = (i == 0) ? gf_t'(0) : g3_i[i-1];
        end
        ngs = gshift_i + 1'b1;
        ndw = decwina_i - 1'b1;
      end else if (gshift_i > 0) begin
        act = KES_REDUCE_DELAY;
        for (int i = 0; i < KW; i++) begin
          nf2[i] = rf2[i];
          nf3[i] = (i == 0) ? gf_t'(0) : rf3[i-1];
          ng2[i] = (i == KW - 1) ? gf_t'(0) : g2_i[i+1];
        end
        ngs = gshift_i - 1'b1;
      end else begin
        act = KES_REDUCE_SWAP;
        for (int i = 0; i < KW; i++) begin
          nf2[i] = g2_i[i];
          nf3[i] = g3_i[i];
          ng2[i] = (i == 0) ? gf_t'(0) : rf2[i-1];
          ng3[i] = (i == 0) ? gf_t'(0) : rf3[i-1];
        end
        ngs = gshift_i + 1'b1;
        ndw = decwina_i - 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o   <= 1'b0;
      gshift_o  <= '0;
      decwina_o <= '0;
      act_o     <= KES_NULL;
      for (int i = 0; i < KW; i++) begin
        f2_o[i] <= '0; f3_o[i] <= '0; g2_o[i] <= '0; g3_o[i] <= '0;
      end
    end else begin
      valid_o   <= valid_i;
      gshift_o  <= ngs;
      decwina_o <= ndw;
      act_o     <= act;
      f2_o <= nf2; f3_o <= nf3; g2_o <= ng2; g3_o <= ng3;
    end
  end
endmodule
