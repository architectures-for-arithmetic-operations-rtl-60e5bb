// rs_decoder -- pipelined systolic Reed-Solomon decoder, RS(7,3) over GF(8).
//
// A received word v(x) = v_6 x^6 + ... + v_0 enters one symbol per clock,
// highest power first. Three systolic stages follow one another:
//   rs_syndrome      S_k = v(alpha^k), k = 1..2t
//   rs_key_equation  Lambda(x), Omega(x) by the combined-action Euclidean
//                    algorithm
//   rs_error_calc    e_i = Omega(alpha^-i) / Lambda'(alpha^-i) where
//                    Lambda(alpha^-i) = 0
// The received symbols are held in a word buffer (the decoder's delay line)
// until their error values arrive, and the correction adder XORs each e_i
// onto v_i. The generator of the code has the roots alpha^1..alpha^2t
// (g(x) = x^4 + a^3 x^3 + x^2 + a x + a^3 for the default sizes).
//
// Interface: in_valid/in_ready handshake on the input; in_ready drops after
// the N-th symbol and rises again when the word's last corrected symbol has
// left, so one word is in flight at a time. The corrected word leaves as
// out_valid for N consecutive clocks with out_pos = 0..N-1 (the power of x),
// lowest power first, in the order the alpha^-i generator visits the
// positions. out_done marks the last symbol; out_uncorrectable is valid with
// it and is set when the number of roots found differs from deg Lambda.
// kes_act shows the action of each key-equation PE, for observation.
// Latency: the first corrected symbol is visible NPE + T + 4 clocks after the
// edge that takes the last input symbol. One word in flight and the position-
// addressed buffer are this design's choices; the three-stage structure,
// the delay-and-add correction and the root-count check follow the thesis.
module rs_decoder
  import gf_pkg::*;
#(
  parameter int unsigned N   = 7,
  parameter int unsigned T   = 2,
  parameter int unsigned NPE = 2 * (T + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  gf_t                  in_sym,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_pos,
  output gf_t                  out_sym,
  output logic                 out_done,
  output logic                 out_uncorrectable,
  output kes_act_e             kes_act [NPE]
);
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned CW = $clog2(N + 1);

  // ---------------- input framing and word buffer ----------------
  logic [CW-1:0] rx_cnt;
  logic          in_flight;   // word received, not yet fully corrected
  logic          take;
  gf_t           rx_buf [N];
  logic          ec_valid, ec_done, ec_unc;
  logic [IW-1:0] ec_pos;
  gf_t           ec_err;

  assign in_ready = !in_flight;
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_cnt    <= '0;
      in_flight <= 1'b0;
      for (int i = 0; i < N; i++) rx_buf[i] <= '0;
    end else begin
      if (take) begin
        rx_buf[N - 1 - int'(rx_cnt)] <= in_sym;
        if (rx_cnt == CW'(N - 1)) begin
          rx_cnt    <= '0;
          in_flight <= 1'b1;
        end else begin
          rx_cnt <= rx_cnt + 1'b1;
        end
      end
      if (ec_done) in_flight <= 1'b0;
    end
  end

  // ---------------- syndrome ----------------
  logic syn_valid;
  gf_t  syn [2*T];
  rs_syndrome #(.N(N), .TWO_T(2 * T)) u_syn (
    .clk, .rst_n, .in_valid(take), .in_sym, .out_valid(syn_valid), .syn);

  // ---------------- key equation ----------------
  logic kes_valid;
  gf_t  lambda [T+1];
  gf_t  omega  [T];
  rs_key_equation #(.T(T), .NPE(NPE)) u_kes (
    .clk, .rst_n, .in_valid(syn_valid), .syn, .out_valid(kes_valid),
    .lambda, .omega, .act(kes_act));

  // ---------------- error calculation ----------------
  logic ec_busy;
  rs_error_calc #(.N(N), .T(T)) u_ec (
    .clk, .rst_n, .in_valid(kes_valid), .lambda, .omega, .busy(ec_busy),
    .out_valid(ec_valid), .out_pos(ec_pos), .out_err(ec_err),
    .done(ec_done), .uncorrectable(ec_unc));

  // ---------------- correction adder ----------------
  assign out_valid         = ec_valid;
  assign out_pos           = ec_pos;
  assign out_sym           = rx_buf[ec_pos] ^ ec_err;
  assign out_done          = ec_done;
  assign out_uncorrectable = ec_unc;

  // one word in flight: the error calculation is always free for a new result
  a_ec_free: assert property (@(posedge clk) disable iff (!rst_n)
                              kes_valid |-> !ec_busy)
    else $error("rs_decoder: key-equation result while error calculation busy");
endmodule
