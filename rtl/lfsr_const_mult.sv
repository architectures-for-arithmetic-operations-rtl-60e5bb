// lfsr_const_mult -- multiplication of a GF(2^m) element by a fixed power of
// alpha with a feedback shift register.
//
// The register holds beta = b_0 + b_1 a + ... + b_{m-1} a^{m-1} in the
// polynomial basis of F(x) (default x^4 + x + 1). Each pulse of step
// multiplies the content by alpha^K: with K = 1 this is the serial circuit in
// which one pulse shifts the register and feeds b_{m-1} back into the taps
// of F (b -> b_{m-1} + (b_0 + b_{m-1} f_1) a + ...); with larger K the
// next-state network is the parallel multiplier by alpha^K, so one pulse does
// the work of K serial pulses. The network is formed at elaboration by
// applying the alpha step K times.
//
// Interface and timing: load (priority) writes beta; step multiplies; q is
// the register, valid one clock after the edge. The circuits and the field
// follow the GF(2^4) examples; load/step ports are this design's.
module lfsr_const_mult #(
  parameter int unsigned   M    = 4,
  parameter logic [M:0]    POLY = 5'b10011,   // x^4 + x + 1
  parameter int unsigned   K    = 1           // multiply by alpha^K per step
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [M-1:0] beta,
  input  logic         step,
  output logic [M-1:0] q
);
  // one serial pulse: shift up, feed the top bit back into the taps of F
  function automatic logic [M-1:0] times_alpha(logic [M-1:0] b);
    return {b[M-2:0], 1'b0} ^ (b[M-1] ? POLY[M-1:0] : '0);
  endfunction

  logic [M-1:0] nxt;
  always_comb begin
    nxt = q;
    for (int i = 0; i < int'(K); i++) nxt = times_alpha(nxt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= beta;
    else if (step)  q <= nxt;
  end
endmodule
