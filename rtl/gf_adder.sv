// gf_adder -- addition of two GF(2^m) elements held in shift registers, in
// the serial or the parallel form.
//
// Both addends sit in m-bit registers, loaded with load. start adds them:
//   SERIAL = 1: the two registers shift out one bit per clock, lowest bit
//               first, through one XOR gate into the sum register, which
//               shifts in from the top; the sum is complete after m clocks.
//               The addends are rotated rather than shifted, so they are
//               back in their registers at the end.
//   SERIAL = 0: m XOR gates add all bits in one clock.
// The serial form shifts on the clock that takes start and on the m - 1
// clocks after it. done is high in the clock in which sum first holds the
// result; sum keeps it until the next addition ends. A start while an addition runs is ignored.
// Bit i of every word is the coefficient of alpha^i. The two data-flow forms
// and the recirculation of the addends follow the thesis; load, start, done
// and the bit order of the serial form are this design's.
module gf_adder #(
  parameter int unsigned M      = 4,
  parameter bit          SERIAL = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         start,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] sum
);
  localparam int unsigned CW = $clog2(M + 1);

  logic [M-1:0]  ra, rb;
  logic [CW-1:0] left;               // serial shifts still to go after this one

  assign busy = (left != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra   <= '0;
      rb   <= '0;
      sum  <= '0;
      left <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load && !busy) begin
        ra <= a;
        rb <= b;
      end else if (SERIAL) begin
        // the clock that takes start makes the first of the m shifts
        if (start || busy) begin
          ra   <= {ra[0], ra[M-1:1]};
          rb   <= {rb[0], rb[M-1:1]};
          sum  <= {ra[0] ^ rb[0], sum[M-1:1]};
          left <= busy ? left - 1'b1 : CW'(M - 1);
          done <= busy ? (left == CW'(1)) : (M == 1);
        end
      end else if (start) begin
        sum  <= ra ^ rb;
        done <= 1'b1;
      end
    end
  end
endmodule
