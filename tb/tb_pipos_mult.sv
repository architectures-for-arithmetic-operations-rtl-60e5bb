// tb_pipos_mult -- self-checking testbench of the parallel-in parallel-out
// systolic multiplier, GF(2^4).
//
// Feeds one operation per clock: every pair (A, B) for G = x^4 + x + 1, then
// a random batch for G = x^4 + x^3 + 1 with idle clocks mixed in, and compares
// each product with a shift-and-add reference reduced by G. The latency from
// the edge taking in_valid to out_valid is checked against 3m - 1 clocks, so
// the test also shows the rate of one product per clock.
module tb_pipos_mult;
  localparam int unsigned M = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [M-1:0] a = '0, b = '0, g = '0;
  logic out_valid;
  logic [M-1:0] p;
  int checks = 0, failures = 0, cyc = 0;

  pipos_mult #(.M(M)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0] ref_mul(logic [M-1:0] x, logic [M-1:0] y,
                                           logic [M-1:0] gl);
    logic [M:0] acc, sh, gp;
    gp  = {1'b1, gl};
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
  int           n_out = 0;

  initial begin
    forever begin
      @(posedge clk); #1;
      if (rst_n && out_valid) begin
        logic [M-1:0] e;
        int t0;
        e  = qexp.pop_front();
        t0 = qt.pop_front();
        n_out++;
        checks += 2;
        if (p !== e) begin
          failures++;
          $display("FAIL product %b, expected %b", p, e);
        end
        if (cyc - t0 != 3 * int'(M) - 3) begin
          failures++;
          $display("FAIL latency %0d", cyc - t0);
        end
      end
    end
  end

  task automatic op(logic [M-1:0] av, logic [M-1:0] bv, logic [M-1:0] gl);
    in_valid = 1'b1; a = av; b = bv; g = gl;
    qexp.push_back(ref_mul(av, bv, gl));
    qt.push_back(cyc + 1);                 // taken by the next edge
    @(posedge clk); #1;
    in_valid = 1'b0; a = M'($urandom); b = M'($urandom);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int av = 0; av < (1 << M); av++)
      for (int bv = 0; bv < (1 << M); bv++)
        op(M'(av), M'(bv), 4'b0011);
    for (int i = 0; i < 300; i++) begin
      op(M'($urandom), M'($urandom), 4'b1001);
      if ($urandom_range(0, 3) == 0) begin
        repeat ($urandom_range(1, 3)) @(posedge clk);
        #1;
      end
    end
    repeat (4 * M) @(posedge clk);
    checks++;
    if (n_out != 556 || qexp.size() != 0) begin
      failures++;
      $display("FAIL %0d products seen", n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
