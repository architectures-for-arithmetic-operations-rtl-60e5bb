// gj_array -- triangular Gauss-Jordan systolic array solving A x = b over
// GF(2) for an NN x NN non-singular A.
//
// Row s of the array (s = 0..NN-1) carries out iteration s of the
// Gauss-Jordan algorithm: one boundary cell for column s and NN - s main
// cells for columns s+1..NN-1 and the right-hand side b, so the array has
// (NN^2 + NN)/2 main cells and NN boundary cells. The rows of [A | b] enter
// one per clock. An array row passes rows until it finds the pivot, stores
// the pivot, eliminates column s from every later row, and sends the stored
// pivot on as the last row of the system when the next system's first row
// arrives; column s is dropped. After NN array rows only b remains and the
// rows leaving the last array row are x_0 .. x_{NN-1} in order.
//
// Interface: row_i[w] is the bit of column NN - w (row_i[NN] is column 0,
// row_i[0] is b); first_i marks row 0 of a system and tag_i is carried along
// with it. Systems follow one another every NN clocks; each array row delays
// a system by 2 clocks (the stored pivot leaves one slot late), so x of a
// system leaves on x_o, first_o high with x_0, 2 NN clocks after its first row
// entered. In this implementation a whole matrix row enters an array row in
// one clock (word-level rows), where the thesis skews the bits of a row from
// cell to cell; the cell functions are the thesis's.
module gj_array #(
  parameter int unsigned NN = 5          // order of the system, 2m - 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NN:0]   row_i,
  input  logic          first_i,
  input  logic          tag_i,
  output logic          x_o,
  output logic          first_o,
  output logic          tag_o
);
  logic [NN:0] rows  [NN+1];
  logic        first [NN+1];
  logic        tag   [NN+1];
  logic        first_d [NN];
  logic        tag_d   [NN];

  assign rows[0]  = row_i;
  assign first[0] = first_i;
  assign tag[0]   = tag_i;

  for (genvar s = 0; s < NN; s++) begin : g_row
    localparam int unsigned W = NN - s;        // main cells in this row
    logic t;
    gj_boundary_cell u_bnd (
      .clk, .rst_n, .first(first[s]), .e(rows[s][W]), .t(t));
    for (genvar w = 0; w < W; w++) begin : g_main
      gj_main_cell u_main (
        .clk, .rst_n, .t(t), .e(rows[s][W]), .d(rows[s][w]), .d_o(rows[s+1][w]));
    end
    for (genvar w = W; w <= NN; w++) begin : g_unused
      assign rows[s+1][w] = 1'b0;
    end
    // a system leaves this array row two clocks after it entered
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        first_d[s] <= 1'b0; first[s+1] <= 1'b0;
        tag_d[s]   <= 1'b0; tag[s+1]   <= 1'b0;
      end else begin
        first_d[s] <= first[s]; first[s+1] <= first_d[s];
        tag_d[s]   <= tag[s];   tag[s+1]   <= tag_d[s];
      end
    end
  end

  assign x_o     = rows[NN][0];
  assign first_o = first[NN];
  assign tag_o   = tag[NN];
endmodule
