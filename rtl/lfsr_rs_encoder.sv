// lfsr_rs_encoder -- systematic Reed-Solomon encoder with an (n-k)-stage
// feedback shift register over GF(2^3).
//
// c(x) = x^(n-k) m(x) + r(x), r(x) = x^(n-k) m(x) mod g(x), with g(x) =
// (x + a)(x + a^2)...(x + a^(n-k)) (formed at elaboration). While the k
// message symbols enter, high-order first (m_{k-1} first), they are passed to
// the output and the register divides: fb = m + r_{n-k-1},
// r_0 <= g_0 fb, r_i <= r_{i-1} + g_i fb. Then the feedback is opened and the
// n - k parity symbols are shifted out, r_{n-k-1} first. The default RS(7,3)
// code is the decoder's code, so the output can drive rs_decoder directly.
//
// Interface and timing: in_valid with in_sym for k clocks while in_ready is
// high; then in_ready is low for n - k clocks while the parity leaves. The
// codeword leaves on out_sym with out_valid, one clock after each input and
// highest power first; out_parity marks the parity symbols. The register,
// its taps and the feedback (input plus last stage) follow the thesis; the
// pass-through of the message, the parity shift-out with the feedback
// opened, the handshake and the output register are this design's.
module lfsr_rs_encoder
  import gf_pkg::*;
#(
  parameter int unsigned N = 7,
  parameter int unsigned K = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  gf_t  in_sym,
  output logic out_valid,
  output gf_t  out_sym,
  output logic out_parity
);
  localparam int unsigned R  = N - K;
  localparam int unsigned CW = $clog2(N + 1);

  typedef gf_t coef_t [R+1];
  // g(x) = prod_{i=1..R} (x + alpha^i), coefficient j at index j
  function automatic coef_t gen_poly();
    coef_t g;
    for (int j = 0; j <= int'(R); j++) g[j] = '0;
    g[0] = gf_t'(1);
    for (int i = 1; i <= int'(R); i++) begin
      for (int j = int'(R); j >= 1; j--) g[j] = g[j-1] ^ gf_mul(g[j], gf_apow(i));
      g[0] = gf_mul(g[0], gf_apow(i));
    end
    return g;
  endfunction

  gf_t           r [R];
  logic [CW-1:0] cnt;               // symbols of the current block so far
  logic          par;               // parity phase
  gf_t           fb;
  coef_t         gp;

  assign gp       = gen_poly();
  assign in_ready = !par;
  assign fb       = in_sym ^ r[R-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(R); i++) r[i] <= '0;
      cnt        <= '0;
      par        <= 1'b0;
      out_valid  <= 1'b0;
      out_sym    <= '0;
      out_parity <= 1'b0;
    end else begin
      out_valid  <= 1'b0;
      out_parity <= 1'b0;
      if (!par && in_valid) begin
        r[0] <= gf_mul(gp[0], fb);
        for (int i = 1; i < int'(R); i++) r[i] <= r[i-1] ^ gf_mul(gp[i], fb);
        out_valid <= 1'b1;
        out_sym   <= in_sym;
        if (cnt == CW'(K - 1)) begin
          cnt <= '0;
          par <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end else if (par) begin
        r[0] <= '0;
        for (int i = 1; i < int'(R); i++) r[i] <= r[i-1];
        out_valid  <= 1'b1;
        out_parity <= 1'b1;
        out_sym    <= r[R-1];
        if (cnt == CW'(R - 1)) begin
          cnt <= '0;
          par <= 1'b0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
