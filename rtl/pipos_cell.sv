// pipos_cell -- basic cell (i, k) of the parallel-in parallel-out systolic
// multiplier.
//
// Computes t_{i,k} = t_{i-1,k+1} ^ (g_{m-k} & M_{i-1}) ^ (a_{m-k} & b_{m-i}):
// one coefficient of T_i = x T_{i-1} + M_{i-1} G + b_{m-i} A. The partial
// product bit arrives on the slant path from the row above, the leading
// coefficient M_{i-1} and the multiplier bit b_{m-i} travel along the row,
// and the coefficients a_{m-k} and g_{m-k} travel down the column. The
// result and the row signals are registered once, the column signals twice,
// as the thesis places its delays. Reset values are this design's.
module pipos_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic t_i,           // t_{i-1,k+1}, slant path
  input  logic m_i,           // M_{i-1}, horizontal
  input  logic b_i,           // b_{m-i}, horizontal
  input  logic a_i,           // a_{m-k}, vertical
  input  logic g_i,           // g_{m-k}, vertical
  output logic t_o,
  output logic m_o,
  output logic b_o,
  output logic a_o,
  output logic g_o
);
  logic a_d, g_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {t_o, m_o, b_o, a_d, g_d, a_o, g_o} <= '0;
    end else begin
      t_o <= t_i ^ (g_i & m_i) ^ (a_i & b_i);
      m_o <= m_i;
      b_o <= b_i;
      a_d <= a_i;  a_o <= a_d;
      g_d <= g_i;  g_o <= g_d;
    end
  end
endmodule
