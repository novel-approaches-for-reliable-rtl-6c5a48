// tb_bch_elp_sibm: feeds exact syndromes of random error patterns (0..T errors) to the
// SiBM solver for T = 5 and T = 7 and checks the locator degree, a root at alpha^(-p) for
// every error position p, and that `done` arrives exactly T cycles after `start`.
module tb_bch_elp_sibm;
  import bch_tb_pkg::*;
  import gf9_pkg::gf_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start5 = 0, start7 = 0, done5, done7;
  gf_t  syn5 [11], syn7 [15];
  gf_t  lam5 [6],  lam7 [8];

  bch_elp_sibm #(.T(5)) dut5 (.clk, .rst_n, .start(start5), .syn(syn5), .done(done5), .lambda(lam5));
  bch_elp_sibm #(.T(7)) dut7 (.clk, .rst_n, .start(start7), .syn(syn7), .done(done7), .lambda(lam7));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(int t, int ne);
    int pos [$];
    int unsigned c [9];
    logic [NN-1:0] e;
    int deg, cyc;
    rand_positions(ne, pos);
    e = '0;
    foreach (pos[k]) e[pos[k]] = 1'b1;
    @(negedge clk);
    if (t == 5) begin
      for (int j = 0; j <= 10; j++) syn5[j] = gf_t'(j == 0 ? 0 : syndrome(e, j));
      start5 = 1;
    end else begin
      for (int j = 0; j <= 14; j++) syn7[j] = gf_t'(j == 0 ? 0 : syndrome(e, j));
      start7 = 1;
    end
    @(negedge clk);
    start5 = 0; start7 = 0;
    cyc = 1;
    while (!(t == 5 ? done5 : done7) && cyc < 50) begin @(negedge clk); cyc++; end
    check(cyc == t + 1, $sformatf("T=%0d done after %0d cycles", t, cyc));
    foreach (c[i]) c[i] = 0;
    for (int i = 0; i <= t; i++) c[i] = (t == 5) ? 32'(lam5[i]) : 32'(lam7[i]);
    deg = 0;
    for (int i = 1; i <= t; i++) if (c[i] != 0) deg = i;
    check(c[0] != 0, "Lambda_0 nonzero");
    check(deg == ne, $sformatf("T=%0d degree %0d for %0d errors", t, deg, ne));
    foreach (pos[k])
      check(peval(c, t, (NN - pos[k]) % NN) == 0, $sformatf("T=%0d root for position %0d", t, pos[k]));
  endtask

  initial begin
    init();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 8; rep++) begin
      for (int ne = 0; ne <= 5; ne++) run(5, ne);
      for (int ne = 0; ne <= 7; ne++) run(7, ne);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
