// gj_main_cell -- main array cell of the Gauss-Jordan systolic array.
//
// Holds one bit R of the stored (pivot) row. The tag T and the element E of
// the pivot column select the mode:
//   T = 0, E = 0   row passing   D' <= R, R <= D (exchange with the stored bit)
//   T = 0, E = 1   row loading   same operation; the loaded row is the pivot
//   T = 1          column elimination and row rotation   D' <= D xor (E and R)
// D' is registered: one clock from D to D'. The modes are the thesis's.
module gj_main_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic t,       // tag from the boundary cell
  input  logic e,       // element of the pivot column in this row
  input  logic d,       // arriving bit
  output logic d_o      // departing bit
);
  logic r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r   <= 1'b0;
      d_o <= 1'b0;
    end else if (t) begin
      d_o <= d ^ (e & r);
    end else begin
      d_o <= r;
      r   <= d;
    end
  end
endmodule
