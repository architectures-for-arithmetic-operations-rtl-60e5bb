// mom_parallel_mult -- parallel modified Massey-Omura multiplier for GF(2^m)
// in the normal basis {a, a^2, a^4, ..., a^(2^(m-1))}, a a root of the
// irreducible all-one polynomial x^m + ... + x + 1 (m = 4 by default).
//
// All m product digits are formed at once from
//   d_{m-1-k} = b P c' + b(k) Q c(k)',   k = 0 .. m-1,
// where b(k) is the k-fold right cyclic shift of b and M_{m-1} = P + Q, P
// holding the 1s at row (m/2 + j) mod m. Block B1 forms the common term
// d~ = b P c' once; m copies of block B2 form b(k) Q c(k)', each fed with the
// operands cyclically shifted one place further than its neighbour, so B2
// has m - 1 AND gates and B1 m. P and Q are computed at elaboration from the
// rule that entry (i, j) of M_{m-1} is 1 when 2^i + 2^j is 0 or 2^(m-1)
// modulo m + 1 (the matrices of the thesis's GF(16) example).
//
// Interface and timing: b and c are taken with in_valid; d and out_valid
// appear one clock later; one product per clock. The B1/B2 structure follows
// the thesis; the registered output is this design's choice.
module mom_parallel_mult #(
  parameter int unsigned M = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [M-1:0] b,
  input  logic [M-1:0] c,
  output logic         out_valid,
  output logic [M-1:0] d
);
  typedef logic [M-1:0] row_t;
  typedef logic [M-1:0][M-1:0] mat_t;   // [row][column]

  // M_{m-1} minus its permutation part P: the matrix Q of block B2
  function automatic mat_t q_mat();
    mat_t qm;
    int   top, e;
    top = 1;
    for (int i = 0; i < int'(M) - 1; i++) top = (2 * top) % (int'(M) + 1);
    for (int i = 0; i < int'(M); i++)
      for (int j = 0; j < int'(M); j++) begin
        e = ((1 << i) + (1 << j)) % (int'(M) + 1);
        qm[i][j] = ((e == 0) || (e == top)) ^ (i == (int'(M) / 2 + j) % int'(M));
      end
    return qm;
  endfunction
  localparam mat_t Q = q_mat();

  // k-fold right cyclic shift: element i of b(k) is b_((i - k))
  function automatic row_t rshift(row_t x, int k);
    row_t y;
    for (int i = 0; i < int'(M); i++) y[i] = x[(i - k + int'(M)) % int'(M)];
    return y;
  endfunction

  logic dt;                              // block B1
  row_t dk;                              // blocks B2, dk[m-1-k] from shift k
  row_t bk [M], ck [M];

  always_comb begin
    dt = 1'b0;
    for (int j = 0; j < int'(M); j++) dt ^= b[(int'(M) / 2 + j) % int'(M)] & c[j];
  end

  for (genvar k = 0; k < int'(M); k++) begin : g_b2
    assign bk[k] = rshift(b, k);
    assign ck[k] = rshift(c, k);
    always_comb begin
      dk[int'(M) - 1 - k] = 1'b0;
      for (int i = 0; i < int'(M); i++)
        for (int j = 0; j < int'(M); j++)
          if (Q[i][j]) dk[int'(M) - 1 - k] ^= bk[k][i] & ck[k][j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      d         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) d <= dk ^ {M{dt}};
    end
  end
endmodule
