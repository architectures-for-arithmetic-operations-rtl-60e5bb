// rs_error_calc -- error location and error value calculation (Chien/Forney).
//
// Takes the error locator Lambda(x) and evaluator Omega(x) from the key
// equation solver and, for i = 0 .. N-1, evaluates Lambda, its formal
// derivative Lambda' and Omega at alpha^-i. Position i is in error when
// Lambda(alpha^-i) = 0, and its error value is
// e_i = Omega(alpha^-i) / Lambda'(alpha^-i); elsewhere e_i = 0.
//
// Structure: an alpha^-1 LFSR (rs_alpha_inv_lfsr) produces the arguments,
// one per clock, and three systolic Horner arrays of T+1 rs_eval_cell cells
// evaluate the three polynomials in lockstep, so all three values for one
// argument leave together. The derivative keeps the odd-power coefficients of
// Lambda, moved down by one power (in GF(2^m) 2a = 0). A final stage divides
// and counts the roots; with the last position it raises done and flags an
// uncorrectable word when the number of roots differs from deg Lambda.
//
// Timing: in_valid loads the coefficients and starts a run; out_valid is high
// for N consecutive clocks, positions 0..N-1 in order, the first becoming
// visible T+2 clocks after the edge that samples in_valid. busy is high during a run; in_valid is ignored while busy.
// The evaluation order (alpha^-i with increasing i) follows the thesis's
// generator; the root-count check is the method the thesis suggests.
module rs_error_calc
  import gf_pkg::*;
#(
  parameter int unsigned N = 7,
  parameter int unsigned T = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  gf_t                  lambda [T+1],
  input  gf_t                  omega  [T],
  output logic                 busy,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_pos,     // i: power of x of the symbol
  output gf_t                  out_err,     // e_i
  output logic                 done,        // with the last position
  output logic                 uncorrectable
);
  localparam int unsigned NC = T + 1;       // cells per array
  localparam int unsigned IW = $clog2(N);

  // ---------------- argument generation ----------------
  logic          run;
  logic [IW-1:0] cnt;
  gf_t           xarg;
  logic          start;
  assign start = in_valid && !busy;

  rs_alpha_inv_lfsr u_lfsr (.clk, .rst_n, .init(start), .step(run), .x(xarg));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      cnt <= '0;
    end else if (start) begin
      run <= 1'b1;
      cnt <= '0;
    end else if (run) begin
      cnt <= cnt + 1'b1;
      if (cnt == IW'(N - 1)) run <= 1'b0;
    end
  end

  // ---------------- coefficient vectors (highest power first) -----------
  gf_t c_lam [NC], c_dlam [NC], c_om [NC];
  always_comb begin
    for (int c = 0; c < NC; c++) begin
      int j;
      j = NC - 1 - c;                                       // power of x
      c_lam[c]  = lambda[j];
      c_dlam[c] = ((j + 1 <= int'(T)) && ((j + 1) % 2 == 1)) ? lambda[j+1] : gf_t'(0);
      c_om[c]   = (j < int'(T)) ? omega[j] : gf_t'(0);
    end
  end

  // ---------------- three systolic Horner arrays ----------------
  gf_t           a_l [NC+1], a_d [NC+1], a_o [NC+1];
  gf_t           x_l [NC+1], x_d [NC+1], x_o [NC+1];
  logic          v_l [NC+1], v_d [NC+1], v_o [NC+1];
  logic [IW-1:0] i_l [NC+1], i_d [NC+1], i_o [NC+1];

  assign a_l[0] = '0;  assign a_d[0] = '0;  assign a_o[0] = '0;
  assign x_l[0] = xarg; assign x_d[0] = xarg; assign x_o[0] = xarg;
  assign v_l[0] = run;  assign v_d[0] = run;  assign v_o[0] = run;
  assign i_l[0] = cnt;  assign i_d[0] = cnt;  assign i_o[0] = cnt;

  for (genvar c = 0; c < NC; c++) begin : g_cells
    rs_eval_cell #(.IW(IW)) u_lam (
      .clk, .rst_n, .load(start), .coef_i(c_lam[c]),
      .v_i(v_l[c]), .idx_i(i_l[c]), .a_i(a_l[c]), .x_i(x_l[c]),
      .v_o(v_l[c+1]), .idx_o(i_l[c+1]), .a_o(a_l[c+1]), .x_o(x_l[c+1]));
    rs_eval_cell #(.IW(IW)) u_dlam (
      .clk, .rst_n, .load(start), .coef_i(c_dlam[c]),
      .v_i(v_d[c]), .idx_i(i_d[c]), .a_i(a_d[c]), .x_i(x_d[c]),
      .v_o(v_d[c+1]), .idx_o(i_d[c+1]), .a_o(a_d[c+1]), .x_o(x_d[c+1]));
    rs_eval_cell #(.IW(IW)) u_om (
      .clk, .rst_n, .load(start), .coef_i(c_om[c]),
      .v_i(v_o[c]), .idx_i(i_o[c]), .a_i(a_o[c]), .x_i(x_o[c]),
      .v_o(v_o[c+1]), .idx_o(i_o[c+1]), .a_o(a_o[c+1]), .x_o(x_o[c+1]));
  end

  // ---------------- degree of Lambda, held for the run ----------------
  logic [$clog2(T+2)-1:0] deg_lam, deg_q;
  always_comb begin
    deg_lam = '0;
    for (int j = 0; j <= int'(T); j++)
      if (lambda[j] != '0) deg_lam = ($clog2(T+2))'(j);
  end

  // ---------------- error value and root count ----------------
  logic                   is_root;
  logic [$clog2(N+1)-1:0] roots;
  assign is_root = (a_l[NC] == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      deg_q         <= '0;
      roots         <= '0;
      out_valid     <= 1'b0;
      out_pos       <= '0;
      out_err       <= '0;
      done          <= 1'b0;
      uncorrectable <= 1'b0;
      busy          <= 1'b0;
    end else begin
      if (start) begin
        deg_q <= deg_lam;
        roots <= '0;
        busy  <= 1'b1;
      end
      out_valid <= v_l[NC];
      out_pos   <= i_l[NC];
      out_err   <= (v_l[NC] && is_root) ? gf_div(a_o[NC], a_d[NC]) : gf_t'(0);
      done      <= v_l[NC] && (i_l[NC] == IW'(N - 1));
      if (v_l[NC] && is_root) roots <= roots + 1'b1;
      if (v_l[NC] && (i_l[NC] == IW'(N - 1))) begin
        uncorrectable <= (32'(roots) + 32'(is_root)) != 32'(deg_q);
        busy          <= 1'b0;
      end
    end
  end
endmodule
