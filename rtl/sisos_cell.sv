// sisos_cell -- basic cell of the serial-in serial-out systolic multiplier.
//
// Computes one step T_i = x T_{i-1} + M G + b A of the MSB-first standard
// basis multiplication, one coefficient per clock:
//   p_o <= (p_i & c_i) ^ (g_i & M) ^ (a_i & b_i)
// M is the leading coefficient of T_{i-1}. It arrives on p_i in the clock
// where the control c_i is 0; the multiplexer then loads it into the M
// register, and the AND with c_i removes it from the sum (the x^m term is
// cancelled by the leading 1 of G). In the other clocks the register keeps
// its value. p passes the cell in one clock, g, a and c in two, so each cell
// moves the partial product one coefficient ahead of A and G, which is the
// multiplication by x. Gates, multiplexer and delays are those of the
// thesis's cell; reset values are this design's.
module sisos_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic p_i, g_i, a_i, c_i,
  input  logic b_i,           // multiplier coefficient used by this cell
  output logic p_o, g_o, a_o, c_o
);
  logic m_q, m_d;
  logic g_d, a_d, c_d;        // first of the two latches on g, a and c

  assign m_d = c_i ? m_q : p_i;           // the multiplexer

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_q <= 1'b0;
      p_o <= 1'b0;
      {g_d, a_d, c_d} <= '0;
      {g_o, a_o, c_o} <= '0;
    end else begin
      m_q <= m_d;
      p_o <= (p_i & c_i) ^ (g_i & m_q) ^ (a_i & b_i);
      {g_d, a_d, c_d} <= {g_i, a_i, c_i};
      {g_o, a_o, c_o} <= {g_d, a_d, c_d};
    end
  end
endmodule
