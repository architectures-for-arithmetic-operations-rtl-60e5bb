// mom_serial_mult -- bit-serial modified Massey-Omura multiplier for GF(2^m)
// in the normal basis {a, a^2, a^4, ..., a^(2^(m-1))}, a a root of the
// irreducible all-one polynomial x^m + ... + x + 1 (m + 1 prime, 2 primitive
// modulo m + 1; m = 4 by default).
//
// Product digit m-1-k is d_{m-1-k} = b P c' + b(k) Q c(k)', where b(k) is
// the k-fold right cyclic shift of b and M_{m-1} = P + Q is the multiplication
// matrix of the last coordinate split into the permutation P (row i = (m/2 +
// j) mod m) and the remainder Q. The common term d~ = b P c' is formed once
// by block B1 from two fixed registers and held in a flip-flop; block B2
// forms b(k) Q c(k)' from two circulating registers, which rotate right by
// one place per clock, so one product digit leaves per clock. Both matrices
// are computed at elaboration from the rule that entry (i, j) of M_{m-1} is 1
// when 2^i + 2^j is 0 or 2^(m-1) modulo m + 1.
//
// Interface and timing: b_in and c_in are loaded bit-serially, b_0 and c_0
// first, in m clocks with in_valid high (in_ready is high while loading is
// allowed). The next m clocks emit d_{m-1}, d_{m-2}, ..., d_0 on d_out with
// out_valid high, the first one clock after the edge taking the last input
// bit; a new operand pair can then be loaded, so one product takes 2m clocks.
// The register arrangement and the gate-level B1/B2 follow the thesis; the
// flip-flop that holds d~ is modelled as a register written at the first
// output clock, and the handshake is this design's own.
module mom_serial_mult #(
  parameter int unsigned M = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic b_in,
  input  logic c_in,
  output logic out_valid,
  output logic d_out
);
  typedef logic [M-1:0] row_t;
  typedef logic [M-1:0][M-1:0] mat_t;   // [row][column]

  // M_{m-1} of the all-one-polynomial normal basis
  function automatic mat_t m_last();
    mat_t mm;
    int   top, e;
    mm  = '0;
    top = 1;
    for (int i = 0; i < int'(M) - 1; i++) top = (2 * top) % (int'(M) + 1);
    for (int i = 0; i < int'(M); i++)
      for (int j = 0; j < int'(M); j++) begin
        e = ((1 << i) + (1 << j)) % (int'(M) + 1);
        mm[i][j] = (e == 0) || (e == top);
      end
    return mm;
  endfunction

  function automatic mat_t p_mat();
    mat_t pm;
    pm = '0;
    for (int i = 0; i < int'(M); i++)
      for (int j = 0; j < int'(M); j++)
        pm[i][j] = (i == (int'(M) / 2 + j) % int'(M));
    return pm;
  endfunction

  localparam mat_t P = p_mat();
  localparam mat_t ML = m_last();

  function automatic logic bilinear(row_t x, row_t y, mat_t mm);
    logic s;
    s = 1'b0;
    for (int i = 0; i < int'(M); i++)
      for (int j = 0; j < int'(M); j++)
        if (mm[i][j]) s ^= x[i] & y[j];
    return s;
  endfunction

  function automatic mat_t q_mat();
    mat_t qm;
    for (int i = 0; i < int'(M); i++) qm[i] = ML[i] ^ P[i];
    return qm;
  endfunction
  localparam mat_t Q = q_mat();

  localparam int unsigned CW = $clog2(M + 1);

  row_t          b_fix, c_fix, b_rot, c_rot;
  logic          loading;
  logic [CW-1:0] cnt;
  logic          dt_q;                // d~, held for the whole output phase
  logic          b1, b2;

  assign in_ready = loading;
  assign b1 = bilinear(b_fix, c_fix, P);    // block B1
  assign b2 = bilinear(b_rot, c_rot, Q);    // block B2

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_fix <= '0; c_fix <= '0; b_rot <= '0; c_rot <= '0;
      loading   <= 1'b1;
      cnt       <= '0;
      dt_q      <= 1'b0;
      out_valid <= 1'b0;
      d_out     <= 1'b0;
    end else if (loading) begin
      out_valid <= 1'b0;
      if (in_valid) begin
        // new bit enters at the top: after m shifts bit 0 holds b_0
        b_fix <= {b_in, b_fix[M-1:1]};
        c_fix <= {c_in, c_fix[M-1:1]};
        b_rot <= {b_in, b_rot[M-1:1]};
        c_rot <= {c_in, c_rot[M-1:1]};
        if (cnt == CW'(M - 1)) begin
          cnt     <= '0;
          loading <= 1'b0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end else begin
      // output digit m-1-cnt; then rotate right by one place
      out_valid <= 1'b1;
      d_out     <= ((cnt == '0) ? b1 : dt_q) ^ b2;
      if (cnt == '0) dt_q <= b1;
      b_rot <= {b_rot[M-2:0], b_rot[M-1]};
      c_rot <= {c_rot[M-2:0], c_rot[M-1]};
      if (cnt == CW'(M - 1)) begin
        cnt     <= '0;
        loading <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
