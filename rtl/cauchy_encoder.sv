// cauchy_encoder -- systematic systolic Reed-Solomon encoder (Cauchy encoder).
//
// RS(N,K) over GF(8) with R = N - K check symbols. The systematic generator
// matrix is [I | A] with the generalised Cauchy matrix
// A_ij = c_i d_j / (x_i + y_j), so w_j = d_j sum_i m_i c_i / (x_i + y_j).
// The encoder is a linear chain: the preprocessing cell C_pre (premultiplies
// m_i by c_i, generates the timing signal T) followed by the Cauchy cells
// C_{R-1}, ..., C_0, each computing one check symbol. There is no global
// feedback: every signal travels only between neighbouring cells.
//
// Interface: start high on the first clock of a block, with m_0 on m_in;
// m_1 .. m_{K-1} follow on the next clocks; a new block may start every N
// clocks. The codeword m_0 .. m_{K-1} w_0 .. w_{R-1} leaves on out_sym with
// out_valid high for N consecutive clocks, the first R + 1 clocks after the
// edge that takes start. The first symbol out is the coefficient of x^(N-1).
// The code's roots are alpha^L .. alpha^(L+R-1) with L = 1 - A_EXP; the
// thesis example uses a = 1 (roots alpha^0..alpha^3). Hardwired constants
// (no run-time reconfiguration of redundancy or roots) are this design's
// choice.
module cauchy_encoder
  import gf_pkg::*;
#(
  parameter int unsigned N     = 7,
  parameter int unsigned K     = 3,
  parameter int          A_EXP = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  gf_t  m_in,
  output logic out_valid,
  output gf_t  out_sym,
  output logic out_t        // timing signal leaving C_0 (1 on message symbols)
);
  localparam int unsigned R = N - K;

  // stream index s: s = R is the output of C_pre, s = j the output of C_j
  gf_t  mc [R+1];
  gf_t  d  [R+1];
  logic t  [R+1];
  logic v  [R+1];

  cauchy_pre #(.N(N), .K(K), .A_EXP(A_EXP)) u_pre (
    .clk, .rst_n, .start, .m_in, .mc(mc[R]), .d(d[R]), .t(t[R]), .v(v[R]));

  for (genvar j = 0; j < R; j++) begin : g_cell
    cauchy_cell #(.N(N), .K(K), .J(j), .A_EXP(A_EXP)) u_cell (
      .clk, .rst_n,
      .mc_i(mc[j+1]), .d_i(d[j+1]), .t_i(t[j+1]), .v_i(v[j+1]),
      .mc_o(mc[j]), .d_o(d[j]), .t_o(t[j]), .v_o(v[j]));
  end

  assign out_valid = v[0];
  assign out_sym   = d[0];
  assign out_t     = t[0];
endmodule
