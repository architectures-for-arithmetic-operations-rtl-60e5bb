// cauchy_cell -- Cauchy cell C_j of the systolic RS encoder.
//
// Computes the check symbol w_j = d_j * sum_i m_i c_i / (x_i + y_j) and
// inserts it into the output stream. Per block (local cycle i):
//   i = 0..K-1 (T = 1)  x_i register: x_0 at i = 0, then times alpha^-1 each
//                       clock; w'_j += m_i c_i / (x_i + y_j); S1 at A: the
//                       output line repeats the incoming D (message symbols)
//   i = K (first T = 0) the same divider computes w_j = w'_j / d_j^-1 (switch
//                       S2), and S1 at B puts w_j on the output line
//   i > K               S1 at C: the output line repeats D delayed one clock,
//                       passing on the check symbols of the cells upstream
// All three streams (m_i c_i, D, T) and the block marker v leave one clock
// later, so every cell works on its own local cycle count. y_j and d_j^-1
// are hardwired from eqns for x_i, y_j, d_j of the Cauchy matrix. One divider
// per cell, shared by the accumulation and the final scaling, as in the
// thesis. The start of a block is recognised as a rising edge of T and
// cycle K as its falling edge.
module cauchy_cell
  import gf_pkg::*;
#(
  parameter int unsigned N     = 7,
  parameter int unsigned K     = 3,
  parameter int unsigned J     = 0,   // index of the check symbol
  parameter int          A_EXP = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  gf_t  mc_i,
  input  gf_t  d_i,
  input  logic t_i,
  input  logic v_i,
  output gf_t  mc_o,
  output gf_t  d_o,
  output logic t_o,
  output logic v_o
);
  localparam gf_t X0   = cauchy_x0(int'(N));
  localparam gf_t Y    = cauchy_y(int'(N), int'(K), int'(J));
  localparam gf_t DINV = cauchy_dinv(int'(N), int'(K), A_EXP, int'(J));
  localparam gf_t AINV = gf_apow(-1);

  gf_t  x_q, w_q, d_prev;
  logic t_prev;
  logic first, at_k;
  gf_t  x_cur, num, den, quo;

  assign first = t_i && !t_prev;
  assign at_k  = !t_i && t_prev;
  assign x_cur = first ? X0 : x_q;
  // shared divider, switch S2
  assign num   = t_i ? mc_i : w_q;
  assign den   = t_i ? (x_cur ^ Y) : DINV;
  assign quo   = gf_div(num, den);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q    <= '0;
      w_q    <= '0;
      d_prev <= '0;
      t_prev <= 1'b0;
      mc_o   <= '0;
      d_o    <= '0;
      t_o    <= 1'b0;
      v_o    <= 1'b0;
    end else begin
      t_prev <= t_i;
      d_prev <= d_i;
      if (t_i) begin
        x_q <= gf_mul(x_cur, AINV);
        w_q <= (first ? gf_t'(0) : w_q) ^ quo;
      end
      // switch S1
      if (t_i)       d_o <= d_i;      // A
      else if (at_k) d_o <= quo;      // B
      else           d_o <= d_prev;   // C
      mc_o <= mc_i;
      t_o  <= t_i;
      v_o  <= v_i;
    end
  end
endmodule
