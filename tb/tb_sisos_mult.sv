// tb_sisos_mult -- self-checking testbench of the serial-in serial-out
// systolic multiplier, GF(2^4).
//
// Streams every pair (A, B) back to back, one operation every m clocks, for
// G = x^4 + x + 1, then a random batch for G = x^4 + x^3 + 1 with gaps
// between some operations. Each product, collected MSB first, is compared
// with a shift-and-add reference reduced by G. The testbench also checks that
// out_first comes 2m clocks after start and that results leave at a rate of
// one per m clocks when the inputs are back to back.
module tb_sisos_mult;
  localparam int unsigned M = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, a_in = 1'b0, g_in = 1'b0;
  logic [M-1:0] b = '0;
  logic out_valid, out_first, p_out;
  int checks = 0, failures = 0, cyc = 0;

  sisos_mult #(.M(M)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0] ref_mul(logic [M-1:0] x, logic [M-1:0] y,
                                           logic [M:0] gp);
    logic [M:0] acc, sh;
    acc = '0;
    sh  = {1'b0, x};
    for (int i = 0; i < int'(M); i++) begin
      if (y[i]) acc ^= sh;
      sh = sh << 1;
      if (sh[M]) sh ^= gp;
    end
    return acc[M-1:0];
  endfunction

  logic [M-1:0] qexp[$];
  int           qt[$];
  int           n_out = 0, last_first = -1;
  bit           b2b = 1'b1;
  logic [M-1:0] got;
  int           k = 0;

  // collector: sampled 1 ns after each edge
  initial begin
    forever begin
      @(posedge clk); #1;
      if (rst_n && out_valid) begin
        if (out_first) begin
          int t0;
          k = 0;
          t0 = qt.pop_front();
          checks++;
          if (cyc - t0 != 2 * int'(M)) begin
            failures++;
            $display("FAIL latency %0d", cyc - t0);
          end
          if (b2b && last_first >= 0) begin
            checks++;
            if (cyc - last_first != int'(M)) begin
              failures++;
              $display("FAIL spacing %0d", cyc - last_first);
            end
          end
          last_first = cyc;
        end
        got[M-1-k] = p_out;
        k++;
        if (k == int'(M)) begin
          logic [M-1:0] e;
          e = qexp.pop_front();
          checks++;
          n_out++;
          if (got !== e) begin
            failures++;
            $display("FAIL product %b, expected %b", got, e);
          end
        end
      end
    end
  end

  task automatic op(logic [M-1:0] av, logic [M-1:0] bv, logic [M:0] gp);
    qexp.push_back(ref_mul(av, bv, gp));
    qt.push_back(cyc);
    for (int i = int'(M) - 1; i >= 0; i--) begin
      start = (i == int'(M) - 1);
      a_in  = av[i];
      g_in  = gp[i];
      b     = bv;
      @(posedge clk); #1;
    end
    start = 1'b0; a_in = 1'b0; g_in = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int av = 0; av < (1 << M); av++)
      for (int bv = 0; bv < (1 << M); bv++)
        op(M'(av), M'(bv), 5'b10011);
    b2b = 1'b0;
    for (int i = 0; i < 300; i++) begin
      op(M'($urandom), M'($urandom), 5'b11001);
      if ($urandom_range(0, 3) == 0) begin
        repeat ($urandom_range(1, 5)) @(posedge clk);
        #1;
      end
      last_first = -1;
    end
    repeat (4 * M) @(posedge clk);
    checks++;
    if (n_out != 256 + 300 || qexp.size() != 0) begin
      failures++;
      $display("FAIL %0d products seen", n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
