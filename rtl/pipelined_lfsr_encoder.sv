// pipelined_lfsr_encoder -- systematic RS(7,3) encoder whose feedback path is
// pipelined, encoding two codewords interleaved 2:1.
//
// The feedback symbol fb = in + b_{n-k-1} does not go to every stage at
// once: it enters a chain of n - k registers (t_{n-k-1} first, t_0 last),
// and tap g_j takes it from t_j, that is n - k - j clocks late. The bottom
// chain is the usual divider, b_0 <= g_0 t_0, b_j <= b_{j-1} + g_j t_j. Each
// path from fb back to the feedback point is therefore twice as long as in
// the plain encoder, so the circuit divides two independent symbol streams,
// interleaved symbol by symbol, with no global feedback wire.
//
// Interface and timing: 2k message symbols go in on in_sym with in_valid
// while in_ready is high, alternately of word A and word B, each word
// high-order first (A m_{k-1}, B m_{k-1}, A m_{k-2}, ...). They pass to
// out_sym one clock later. Then in_ready is low for 2(n - k) clocks, fb is
// held at 0 and the parity leaves, also interleaved (A r_{n-k-1}, B r_{n-k-1},
// ...), with out_parity set. The register arrangement follows the thesis's
// pipelined LFSR encoder; the handshake, the parity phase (fb held at 0),
// the output register and the order of the two words are this design's.
module pipelined_lfsr_encoder
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
  localparam int unsigned CW = $clog2(2 * N + 1);

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

  gf_t           t [R];             // feedback pipeline, t[j] feeds tap g_j
  gf_t           b [R];             // divider stages
  logic [CW-1:0] cnt;
  logic          par;
  logic          shift;
  gf_t           fb;
  coef_t         gp;

  assign gp       = gen_poly();
  assign in_ready = !par;
  assign shift    = par || in_valid;
  assign fb       = par ? gf_t'(0) : (in_sym ^ b[R-1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(R); i++) begin
        t[i] <= '0;
        b[i] <= '0;
      end
      cnt        <= '0;
      par        <= 1'b0;
      out_valid  <= 1'b0;
      out_sym    <= '0;
      out_parity <= 1'b0;
    end else begin
      out_valid  <= shift;
      out_parity <= par;
      if (shift) begin
        t[R-1] <= fb;
        for (int i = 0; i < int'(R) - 1; i++) t[i] <= t[i+1];
        b[0] <= gf_mul(gp[0], t[0]);
        for (int i = 1; i < int'(R); i++) b[i] <= b[i-1] ^ gf_mul(gp[i], t[i]);
        out_sym <= par ? b[R-1] : in_sym;
        if (!par && cnt == CW'(2 * K - 1)) begin
          cnt <= '0;
          par <= 1'b1;
        end else if (par && cnt == CW'(2 * R - 1)) begin
          cnt <= '0;
          par <= 1'b0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
