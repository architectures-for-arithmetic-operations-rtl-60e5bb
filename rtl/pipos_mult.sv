// pipos_mult -- parallel-in parallel-out systolic multiplier for GF(2^m) in
// the standard basis: P(x) = A(x) B(x) mod G(x), G(x) = x^m + g_{m-1}
// x^{m-1} + ... + g_0.
//
// An m x m array of pipos_cell cells. Row i (i = 1..m) forms T_i = x T_{i-1}
// + M_{i-1} G + b_{m-i} A, with T_0 = 0 and M_{i-1} the leading coefficient
// of T_{i-1}; column k (k = 1..m) holds the coefficient of x^(m-k), so
// P = T_m leaves the bottom row. A cell in row i works on an operand 2(i-1) +
// (k-1) clocks after row 1, column 1 did: a_j and g_j enter column m-j one
// clock after a_{j+1}, b_j enters row m-j two clocks after b_{j+1}, and p_j
// leaves column m-j one clock after p_{j+1}, as the thesis describes. The
// leading coefficient of row i-1 reaches row i through one extra latch. The
// input skew and output deskew registers are inside this module, so a, b, g
// and p are plain parallel words.
//
// Interface and timing: one operation may enter every clock (in_valid with
// a, b and g); p is valid with out_valid 3m - 3 clocks after the edge that
// took in_valid (the thesis counts about 3m clocks including input and output
// delays). The skew registers and valid tracking are this design's;
// the cell equation, its delays and the input order are the thesis's.
module pipos_mult #(
  parameter int unsigned M = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic [M-1:0] g,         // g_0 .. g_{m-1}; g_m = 1 is implied
  output logic         out_valid,
  output logic [M-1:0] p
);
  // signals indexed [row r = i-1][column c = k-1]
  logic t_o [M][M];
  logic m_o [M][M];
  logic b_o [M][M];
  logic a_o [M][M];
  logic g_o [M][M];
  logic a_in [M];                 // a_{m-1-c} after c clocks of skew
  logic g_in [M];
  logic b_in [M];                 // b_{m-1-r} after 2r clocks of skew
  logic m_in [M];                 // M_{r-1} entering row r

  // input skew: column c waits c clocks, row r waits 2r clocks
  for (genvar c = 0; c < M; c++) begin : g_askew
    if (c == 0) begin : g_now
      assign a_in[c] = a[M-1];
      assign g_in[c] = g[M-1];
    end else begin : g_dly
      localparam int unsigned W = c;
      logic [W-1:0] sa, sg;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          sa <= '0; sg <= '0;
        end else begin
          sa <= W'({sa, a[M-1-c]});
          sg <= W'({sg, g[M-1-c]});
        end
      end
      assign a_in[c] = sa[c-1];
      assign g_in[c] = sg[c-1];
    end
  end
  for (genvar r = 0; r < M; r++) begin : g_bskew
    if (r == 0) begin : g_now
      assign b_in[r] = b[M-1];
    end else begin : g_dly
      logic [2*r-1:0] sb;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) sb <= '0;
        else        sb <= {sb[2*r-2:0], b[M-1-r]};
      end
      assign b_in[r] = sb[2*r-1];
    end
  end

  // the array
  for (genvar r = 0; r < M; r++) begin : g_row
    if (r == 0) begin : g_m0
      assign m_in[r] = 1'b0;                 // T_0 = 0
    end else begin : g_mr
      logic m_q;                             // the extra latch
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) m_q <= 1'b0;
        else        m_q <= t_o[r-1][0];
      end
      assign m_in[r] = m_q;
    end
    for (genvar c = 0; c < M; c++) begin : g_col
      logic ti, mi, bi, ai, gi;
      assign ti = (r == 0 || c == M - 1) ? 1'b0 : t_o[(r == 0) ? 0 : r - 1][(c == M - 1) ? c : c + 1];
      assign mi = (c == 0) ? m_in[r] : m_o[r][(c == 0) ? 0 : c - 1];
      assign bi = (c == 0) ? b_in[r] : b_o[r][(c == 0) ? 0 : c - 1];
      assign ai = (r == 0) ? a_in[c] : a_o[(r == 0) ? 0 : r - 1][c];
      assign gi = (r == 0) ? g_in[c] : g_o[(r == 0) ? 0 : r - 1][c];
      pipos_cell u_cell (
        .clk, .rst_n, .t_i(ti), .m_i(mi), .b_i(bi), .a_i(ai), .g_i(gi),
        .t_o(t_o[r][c]), .m_o(m_o[r][c]), .b_o(b_o[r][c]),
        .a_o(a_o[r][c]), .g_o(g_o[r][c]));
    end
  end

  // output deskew: column c waits m-1-c clocks; p_{m-1-c} leaves column c
  for (genvar c = 0; c < M; c++) begin : g_pskew
    if (c == M - 1) begin : g_now
      assign p[M-1-c] = t_o[M-1][c];
    end else begin : g_dly
      localparam int unsigned W = M - 1 - c;
      logic [W-1:0] sp;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) sp <= '0;
        else        sp <= W'({sp, t_o[M-1][c]});
      end
      assign p[M-1-c] = sp[M-2-c];
    end
  end

  // valid: 3m - 3 clocks
  logic [3*M-3:0] vq;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vq <= '0;
    else        vq <= {vq[3*M-4:0], in_valid};
  end
  assign out_valid = vq[3*M-3];
endmodule
