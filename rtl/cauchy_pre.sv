// cauchy_pre -- preprocessing cell C_pre of the systolic Cauchy RS encoder.
//
// A code block is N clocks long and starts with the clock on which start is
// high; message symbols m_0 .. m_{K-1} arrive on m_in in its first K clocks.
// For block cycle i the cell emits, one clock later:
//   mc = m_i c_i   (0 for i >= K)   premultiplied message for the Cauchy cells
//   d  = m_i       (0 for i >= K)   head of the output-stream line, D_r
//   t  = (i < K)                    timing signal T_i
//   v  = 1                          block cycle marker (this design's addition)
// The constants c_i are not stored but generated by the recursion
//   c_{i+1} = alpha^(a+K-1) c_i (1 + alpha^(i-K+1)) / (1 + alpha^(i+1)),
// which needs one full multiplication, one division, one constant
// multiplication and two constant additions per step; the two alpha powers
// are kept in registers that are multiplied by alpha every clock. c_0 is a
// hardwired constant computed at elaboration. The recursion and the outputs
// follow the thesis; the exact form of the recursion is re-derived from the
// definition of c_i, and start/v framing is this design's choice.
module cauchy_pre
  import gf_pkg::*;
#(
  parameter int unsigned N     = 7,
  parameter int unsigned K     = 3,
  parameter int          A_EXP = 1      // a = 1 - L, roots alpha^L ..
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  gf_t  m_in,
  output gf_t  mc,
  output gf_t  d,
  output logic t,
  output logic v
);
  localparam gf_t C0    = cauchy_c(int'(N), int'(K), A_EXP, 0);
  localparam gf_t KSTEP = gf_apow(A_EXP + int'(K) - 1);
  localparam gf_t P1_0  = gf_apow(1);
  localparam gf_t P2_0  = gf_apow(1 - int'(K));
  localparam int unsigned CW = $clog2(N + 1);

  logic          active;
  logic [CW-1:0] i_q;
  gf_t           c_q, p1_q, p2_q;
  gf_t           c_cur, p1_cur, p2_cur;
  logic [CW-1:0] i_cur;
  logic          on;

  assign on     = start || active;
  assign i_cur  = start ? '0   : i_q;
  assign c_cur  = start ? C0   : c_q;
  assign p1_cur = start ? P1_0 : p1_q;
  assign p2_cur = start ? P2_0 : p2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      i_q    <= '0;
      c_q    <= '0;
      p1_q   <= '0;
      p2_q   <= '0;
      mc     <= '0;
      d      <= '0;
      t      <= 1'b0;
      v      <= 1'b0;
    end else begin
      if (on) begin
        active <= (i_cur != CW'(N - 1));
        i_q    <= i_cur + 1'b1;
        c_q    <= gf_div(gf_mul(KSTEP, gf_mul(c_cur, gf_t'(1) ^ p2_cur)),
                         gf_t'(1) ^ p1_cur);
        p1_q   <= gf_mul(p1_cur, gf_t'(2));
        p2_q   <= gf_mul(p2_cur, gf_t'(2));
      end
      v  <= on;
      t  <= on && (i_cur < CW'(K));
      mc <= (on && i_cur < CW'(K)) ? gf_mul(m_in, c_cur) : gf_t'(0);
      d  <= (on && i_cur < CW'(K)) ? m_in : gf_t'(0);
    end
  end
endmodule
