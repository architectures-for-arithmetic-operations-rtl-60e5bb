// gj_divider -- standard-basis inverter and divider for GF(2^m) built on the
// Gauss-Jordan systolic array.
//
// C(x) = B(x) / A(x) mod G(x) satisfies A(x) C(x) + H(x) G(x) = B(x) with
// deg H <= m - 2. Equating the coefficients of x^0 .. x^(2m-2) gives 2m - 1
// linear equations over GF(2) in the unknowns h_0..h_{m-2}, c_0..c_{m-1}:
// row r has g_{r-j} in column j (j < m - 1), a_{r-j} in column m - 1 + j and
// b_r on the right (0 for r >= m). With B = 1 the result is A^-1. The wrapper
// builds these rows from A, B and G and feeds them, one per clock, into
// gj_array with NN = 2m - 1; the last m unknowns leaving the array are C.
//
// Interface: the array works in slots of 2m - 1 clocks. in_ready is high on
// the first clock of each slot; in_valid on that clock starts a division with
// a, b and g (G(x) including g_m = g_0 = 1). Slots without a division carry
// an all-zero system, which flushes the stored pivots. out_valid pulses with
// c = B/A, 3(2m-1) clocks after the edge that took in_valid; one division
// can start every 2m - 1 clocks. A = 0 has no inverse and gives c = 0 or
// an arbitrary value. G is an input, so any field polynomial of degree m can
// be used; the slot framing is this design's choice.
module gj_divider #(
  parameter int unsigned M = 3            // field degree
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic [M:0]   g,
  output logic         out_valid,
  output logic [M-1:0] c
);
  localparam int unsigned NN = 2 * M - 1;
  localparam int unsigned SW = $clog2(NN);

  logic [SW-1:0] slot;
  logic [M-1:0]  a_q, b_q;
  logic [M:0]    g_q;
  logic          busy;          // current slot carries a division
  logic [NN:0]   row;
  logic [SW-1:0] r;

  assign in_ready = (slot == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot <= '0;
      busy <= 1'b0;
      a_q  <= '0;
      b_q  <= '0;
      g_q  <= '0;
    end else begin
      slot <= (slot == SW'(NN - 1)) ? '0 : slot + 1'b1;
      if (slot == '0) begin
        busy <= in_valid;
        if (in_valid) begin
          a_q <= a; b_q <= b; g_q <= g;
        end
      end
    end
  end

  // equation row for x^r; operands come straight from the inputs in the
  // first clock of the slot and from the held copies afterwards
  logic [M-1:0] av, bv;
  logic [M:0]   gv;
  logic         live;
  assign av   = (slot == '0) ? a : a_q;
  assign bv   = (slot == '0) ? b : b_q;
  assign gv   = (slot == '0) ? g : g_q;
  assign live = (slot == '0) ? in_valid : busy;
  assign r    = slot;

  always_comb begin
    row = '0;
    if (live) begin
      for (int j = 0; j < int'(M) - 1; j++)          // h_j column j
        if (int'(r) - j >= 0 && int'(r) - j <= int'(M))
          row[NN - j] = gv[int'(r) - j];
      for (int j = 0; j < int'(M); j++)              // c_j column m-1+j
        if (int'(r) - j >= 0 && int'(r) - j < int'(M))
          row[NN - (int'(M) - 1 + j)] = av[int'(r) - j];
      for (int j = 0; j < int'(M); j++) if (int'(r) == j) row[0] = bv[j];
    end
  end

  // the array
  logic x, xfirst, xtag;
  gj_array #(.NN(NN)) u_array (
    .clk, .rst_n, .row_i(row), .first_i(slot == '0), .tag_i(live),
    .x_o(x), .first_o(xfirst), .tag_o(xtag));

  // collect x_0 .. x_{NN-1}; c_j = x_{m-1+j}
  logic [SW-1:0] k;
  logic          col, col_tag;
  logic [M-1:0]  c_acc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k         <= '0;
      col       <= 1'b0;
      col_tag   <= 1'b0;
      c_acc     <= '0;
      c         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (xfirst) begin
        k       <= SW'(1);
        col     <= 1'b1;
        col_tag <= xtag;
        c_acc   <= '0;
      end else if (col) begin
        k <= k + 1'b1;
        if (int'(k) >= int'(M) - 1) c_acc[int'(k) - (int'(M) - 1)] <= x;
        if (k == SW'(NN - 1)) begin
          col       <= 1'b0;
          out_valid <= col_tag;
          if (col_tag) begin            // c holds the last real quotient
            c      <= c_acc;
            c[M-1] <= x;
          end
        end
      end
    end
  end
endmodule
