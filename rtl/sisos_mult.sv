// sisos_mult -- serial-in serial-out systolic multiplier for GF(2^m) in the
// standard basis: P(x) = A(x) B(x) mod G(x), G(x) = x^m + g_{m-1} x^{m-1} +
// ... + g_0.
//
// A chain of m sisos_cell cells; cell i (i = 1..m) adds b_{m-i} A(x) to x
// times the partial product of the cell before, and reduces by G with the
// leading coefficient it latches, so the last cell emits T_m = P. The
// coefficients of A and G enter serially, MSB first, and the product leaves
// serially, MSB first. The control sequence 0 1 1 ... 1 (length m) is made
// here: its 0 enters one clock ahead of a_{m-1}.
//
// Interface and timing: on the clock where start is high, a_in and g_in
// carry a_{m-1} and g_{m-1}, and b is taken as a parallel word; the next
// m - 1 clocks carry a_{m-2} .. a_0 and g_{m-2} .. g_0. A new operation may
// start every m clocks, back to back. The inputs are registered once, so
// that the control 0 can be placed one clock ahead of the MSB. The product
// leaves on p_out, MSB first, with out_valid high for m clocks and
// out_first marking p_{m-1}, 2m clocks after the clock in which start was
// high. The thesis feeds b_{m-i} to cell i as a fixed input; here b travels
// along the array with the operation (two clocks per cell) so that every
// operation can have its own B. The cell array and its delays follow the
// thesis; the input register, the framing signals and the b pipeline are
// this design's.
module sisos_mult #(
  parameter int unsigned M = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         a_in,
  input  logic         g_in,
  input  logic [M-1:0] b,
  output logic         out_valid,
  output logic         out_first,
  output logic         p_out
);
  localparam int unsigned CW = $clog2(M + 1);

  // input register: a, g, first-of-word and valid
  logic          a_r, g_r, f_r, v_r;
  logic [M-1:0]  b_r;
  logic [CW-1:0] left;             // clocks of the current operand left
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {a_r, g_r, f_r, v_r} <= '0;
      b_r  <= '0;
      left <= '0;
    end else begin
      a_r <= a_in;
      g_r <= g_in;
      f_r <= start;
      v_r <= start || (left != '0);
      if (start) begin
        b_r  <= b;
        left <= CW'(M - 1);
      end else if (left != '0) begin
        left <= left - 1'b1;
      end
    end
  end

  // streams between the cells; index i is the input of cell i
  logic         p [M+1];
  logic         g [M+1];
  logic         a [M+1];
  logic         c [M+1];
  logic         f [M+1];
  logic         v [M+1];
  logic [M-1:0] bw [M+1];          // B word of the operation at each cell
  logic         bit_q [M];         // b_{m-1-k} held in cell k for its word

  assign p[0]  = 1'b0;             // T_0 = 0
  assign g[0]  = g_r;
  assign a[0]  = a_r;
  assign c[0]  = ~start;           // 0 one clock ahead of the MSB
  assign f[0]  = f_r;
  assign v[0]  = v_r;
  assign bw[0] = b_r;

  for (genvar k = 0; k < M; k++) begin : g_cell
    logic b_use;
    // b of the word whose first coefficient is now at this cell
    assign b_use = f[k] ? bw[k][M-1-k] : bit_q[k];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) bit_q[k] <= 1'b0;
      else if (f[k]) bit_q[k] <= bw[k][M-1-k];
    end

    sisos_cell u_cell (
      .clk, .rst_n,
      .p_i(p[k]), .g_i(g[k]), .a_i(a[k]), .c_i(c[k]), .b_i(b_use),
      .p_o(p[k+1]), .g_o(g[k+1]), .a_o(a[k+1]), .c_o(c[k+1]));

    // framing and B travel with a and g: two clocks per cell
    logic         f_d, v_d;
    logic [M-1:0] bw_d;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        {f_d, v_d, f[k+1], v[k+1]} <= '0;
        bw_d <= '0; bw[k+1] <= '0;
      end else begin
        f_d <= f[k]; v_d <= v[k]; f[k+1] <= f_d; v[k+1] <= v_d;
        bw_d <= f[k] ? bw[k] : bw_d; bw[k+1] <= f_d ? bw_d : bw[k+1];
      end
    end
  end

  // p of the last cell is one clock behind the a coefficient it belongs to
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
    end else begin
      out_valid <= v[M-1];
      out_first <= f[M-1];
    end
  end
  assign p_out = p[M];
endmodule
