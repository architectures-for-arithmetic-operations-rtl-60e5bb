// tb_gj_divider -- self-checking testbench of the Gauss-Jordan divider.
//
// Runs the worked inversion of the thesis's Example 3.1 (G = x^3 + x + 1,
// A = x^2 + x, A^-1 = x + 1), then every pair (A, B) with A != 0 for the
// degree-3 field and a batch of random pairs for x^3 + x^2 + 1, issuing a
// division in every slot, so the array is kept full. Each quotient is checked
// by multiplying it back, C * A mod G == B, with a shift-and-add reference.
// The latency from the edge taking in_valid to out_valid is checked against
// 3(2m - 1) clocks and the spacing of results against one per 2m - 1 clocks.
module tb_gj_divider;
  localparam int unsigned M  = 3;
  localparam int unsigned NN = 2 * M - 1;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         in_valid = 1'b0;
  logic         in_ready;
  logic [M-1:0] a = '0, b = '0;
  logic [M:0]   g = '0;
  logic         out_valid;
  logic [M-1:0] c;

  int checks = 0, failures = 0, cyc = 0;

  gj_divider #(.M(M)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0] ref_mulmod(logic [M-1:0] x, logic [M-1:0] y,
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

  // expected operands, queued in issue order
  logic [M-1:0] qa[$], qb[$];
  logic [M:0]   qg[$];
  int           qt[$];

  task automatic issue(logic [M-1:0] av, logic [M-1:0] bv, logic [M:0] gv);
    // inputs change 1 ns after an edge and are taken by the next edge
    while (!in_ready) begin @(posedge clk); #1; end
    in_valid = 1'b1; a = av; b = bv; g = gv;
    qa.push_back(av); qb.push_back(bv); qg.push_back(gv); qt.push_back(cyc);
    @(posedge clk); #1;
    in_valid = 1'b0;
  endtask

  int last_out = -1;
  int n_out = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    logic [M-1:0] ea, eb; logic [M:0] eg; int t0;
    ea = qa.pop_front(); eb = qb.pop_front(); eg = qg.pop_front(); t0 = qt.pop_front();
    checks++;
    if (ref_mulmod(c, ea, eg) !== eb) begin
      failures++;
      $display("FAIL a=%b b=%b g=%b: c=%b", ea, eb, eg, c);
    end
    checks++;
    if (cyc - t0 != 3 * int'(NN)) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc - t0, 3 * NN);
    end
    if (last_out >= 0) begin
      checks++;
      if (cyc - last_out != int'(NN) && n_out > 0 && back_to_back) begin
        failures++;
        $display("FAIL spacing %0d", cyc - last_out);
      end
    end
    last_out = cyc;
    n_out++;
  end

  bit back_to_back = 1'b1;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Example 3.1: inverse of x^2 + x in GF(2^3) with G = x^3 + x + 1
    issue(3'b110, 3'b001, 4'b1011);
    repeat (4 * NN) @(posedge clk);
    checks++;
    if (c !== 3'b011) begin
      failures++;
      $display("FAIL Example 3.1 inverse = %b, expected 011", c);
    end
    last_out = -1;
    // every pair, back to back
    for (int av = 1; av < (1 << M); av++)
      for (int bv = 0; bv < (1 << M); bv++)
        issue(M'(av), M'(bv), 4'b1011);
    repeat (4 * NN) @(posedge clk);
    last_out = -1;
    for (int i = 0; i < 200; i++) begin
      logic [M-1:0] av;
      av = M'($urandom_range(1, (1 << M) - 1));
      issue(av, M'($urandom), 4'b1101);
    end
    repeat (4 * NN) @(posedge clk);
    checks++;
    if (qa.size() != 0 || n_out != 1 + 7 * 8 + 200) begin
      failures++;
      $display("FAIL %0d results, %0d pending", n_out, qa.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
