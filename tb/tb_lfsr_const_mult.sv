// tb_lfsr_const_mult -- self-checking testbench of the constant multiplier
// LFSR in GF(2^4), F(x) = x^4 + x + 1.
//
// Two instances: K = 1 (the serial circuit, one pulse = times alpha) and
// K = 3 (the parallel times-alpha^3 network). For every beta the results of
// one pulse are compared with the printed expressions
//   alpha   beta = b3 + (b0 + b3) a + b1 a^2 + b2 a^3
//   alpha^3 beta = b1 + (b1 + b2) a + (b2 + b3) a^2 + (b0 + b3) a^3
// and three serial pulses must equal one alpha^3 pulse. Every pulse and every
// load takes effect at the next edge.
module tb_lfsr_const_mult;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, step = 1'b0;
  logic [3:0] beta = '0, q1, q3;
  int checks = 0, failures = 0;

  lfsr_const_mult #(.K(1)) dut1 (.clk, .rst_n, .load, .beta, .step, .q(q1));
  lfsr_const_mult #(.K(3)) dut3 (.clk, .rst_n, .load, .beta, .step, .q(q3));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [3:0] b, e1, e3;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int v = 0; v < 16; v++) begin
      b  = 4'(v);
      e1 = {b[2], b[1], b[0] ^ b[3], b[3]};
      e3 = {b[0] ^ b[3], b[2] ^ b[3], b[1] ^ b[2], b[1]};
      load = 1'b1; beta = b;
      @(posedge clk); #1;
      load = 1'b0;
      check(q1 == b && q3 == b, "load");
      step = 1'b1;
      @(posedge clk); #1;
      step = 1'b0;
      check(q1 == e1, $sformatf("alpha * %b = %b, expected %b", b, q1, e1));
      check(q3 == e3, $sformatf("alpha^3 * %b = %b, expected %b", b, q3, e3));
      // two more serial pulses on the K=1 instance only: reload K=3 to hold
      step = 1'b1;
      repeat (2) @(posedge clk);
      #1 step = 1'b0;
      check(q1 == e3, "three serial pulses equal one alpha^3 pulse");
    end
    // powers: alpha^15 = 1
    load = 1'b1; beta = 4'b0001;
    @(posedge clk); #1;
    load = 1'b0; step = 1'b1;
    repeat (15) @(posedge clk);
    #1 step = 1'b0;
    check(q1 == 4'b0001, "alpha^15 = 1");
    check(q3 == 4'b0001, "alpha^45 = 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
