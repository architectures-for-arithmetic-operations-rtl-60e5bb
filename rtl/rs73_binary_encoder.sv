// rs73_binary_encoder -- the RS(7,3) systematic LFSR encoder written at bit
// level: each octal stage is three flip-flops and each generator coefficient
// is a fixed XOR network.
//
// g(x) = x^4 + a^3 x^3 + x^2 + a x + a^3 over GF(8), p(z) = z^3 + z + 1. A
// symbol a2 z^2 + a1 z + a0 is held as {a2, a1, a0}. The two constant
// multipliers are the remainders of z^3 (a2 z^2 + a1 z + a0) and of
// z (a2 z^2 + a1 z + a0) on division by p(z):
//   times a^3: {a1 ^ a2, a0 ^ a1 ^ a2, a0 ^ a2}
//   times a  : {a1, a0 ^ a2, a2}
// and g_2 = 1 is a plain wire. The stage updates are
//   r0 <= a^3 fb, r1 <= r0 ^ a fb, r2 <= r1 ^ fb, r3 <= r2 ^ a^3 fb,
// with fb = in + r3 while the message enters.
//
// Interface and timing are those of lfsr_rs_encoder: 3 message symbols with
// in_valid while in_ready is high, high-order first, passed to out_sym one
// clock later; then in_ready is low for 4 clocks while the parity leaves,
// r3 first, with out_parity set. The XOR networks and stage order follow the
// thesis's binary encoder; the handshake and output register are this
// design's, and the times-a network uses a2 as its constant term where the
// thesis prints a0 (a2 is what the remainder gives).
module rs73_binary_encoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [2:0] in_sym,
  output logic       out_valid,
  output logic [2:0] out_sym,
  output logic       out_parity
);
  logic [2:0] r0, r1, r2, r3, fb, fb_a3, fb_a;
  logic [1:0] cnt;
  logic       par;

  assign in_ready = !par;
  assign fb       = in_sym ^ r3;
  assign fb_a3    = {fb[1] ^ fb[2], fb[0] ^ fb[1] ^ fb[2], fb[0] ^ fb[2]};
  assign fb_a     = {fb[1], fb[0] ^ fb[2], fb[2]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0 <= '0; r1 <= '0; r2 <= '0; r3 <= '0;
      cnt        <= '0;
      par        <= 1'b0;
      out_valid  <= 1'b0;
      out_sym    <= '0;
      out_parity <= 1'b0;
    end else begin
      out_valid  <= 1'b0;
      out_parity <= 1'b0;
      if (!par && in_valid) begin
        r0 <= fb_a3;
        r1 <= r0 ^ fb_a;
        r2 <= r1 ^ fb;
        r3 <= r2 ^ fb_a3;
        out_valid <= 1'b1;
        out_sym   <= in_sym;
        if (cnt == 2'd2) begin
          cnt <= '0;
          par <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end else if (par) begin
        r0 <= '0; r1 <= r0; r2 <= r1; r3 <= r2;
        out_valid  <= 1'b1;
        out_parity <= 1'b1;
        out_sym    <= r3;
        cnt        <= cnt + 1'b1;
        if (cnt == 2'd3) par <= 1'b0;
      end
    end
  end
endmodule
