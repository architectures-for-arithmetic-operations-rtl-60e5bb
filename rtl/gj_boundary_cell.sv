// gj_boundary_cell -- boundary cell of the Gauss-Jordan systolic array.
//
// Watches the element E of its pivot column in each arriving row and issues
// the tag T for that row: T = 0 until the first row with E = 1 (the pivot)
// has been loaded, T = 1 for every later row of the same system. A row marked
// first starts a new system and clears the state, so the tag pattern of one
// iteration is c + 1 zeros followed by n - c - 1 ones. T is combinational
// from the stored flag (one register).
module gj_boundary_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic first,   // row 0 of a new system
  input  logic e,
  output logic t
);
  logic found;
  assign t = first ? 1'b0 : found;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) found <= 1'b0;
    else        found <= t | e;
  end
endmodule
