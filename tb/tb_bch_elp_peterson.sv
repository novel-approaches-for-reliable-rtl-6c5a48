// tb_bch_elp_peterson: feeds exact syndromes of random error patterns (0..T errors) to
// the Peterson solver for T = 1 and T = 3, and checks that the returned polynomial has
// degree equal to the error count, a root at alpha^(-p) for every error position p, and
// that `done` follows `start` by one cycle.
module tb_bch_elp_peterson;
  import bch_tb_pkg::*;
  import gf9_pkg::gf_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start1 = 0, start3 = 0, done1, done3;
  gf_t  syn1 [3], syn3 [7];
  gf_t  lam1 [2], lam3 [4];

  bch_elp_peterson #(.T(1)) dut1 (.clk, .rst_n, .start(start1), .syn(syn1), .done(done1), .lambda(lam1));
  bch_elp_peterson #(.T(3)) dut3 (.clk, .rst_n, .start(start3), .syn(syn3), .done(done3), .lambda(lam3));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(int t, int ne);
    int pos [$];
    int unsigned c [9];
    logic [NN-1:0] e;
    int deg;
    rand_positions(ne, pos);
    e = '0;
    foreach (pos[k]) e[pos[k]] = 1'b1;
    @(negedge clk);
    if (t == 1) begin
      for (int j = 0; j <= 2; j++) syn1[j] = gf_t'(j == 0 ? 0 : syndrome(e, j));
      start1 = 1;
    end else begin
      for (int j = 0; j <= 6; j++) syn3[j] = gf_t'(j == 0 ? 0 : syndrome(e, j));
      start3 = 1;
    end
    @(negedge clk);
    start1 = 0; start3 = 0;
    check(t == 1 ? done1 : done3, "done one cycle after start");
    foreach (c[i]) c[i] = 0;
    for (int i = 0; i <= t; i++) c[i] = (t == 1) ? 32'(lam1[i]) : 32'(lam3[i]);
    deg = 0;
    for (int i = 1; i <= t; i++) if (c[i] != 0) deg = i;
    check(deg == ne, $sformatf("T=%0d degree %0d for %0d errors", t, deg, ne));
    foreach (pos[k])
      check(peval(c, t, (NN - pos[k]) % NN) == 0, $sformatf("T=%0d root for position %0d", t, pos[k]));
  endtask

  initial begin
    init();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 10; rep++) begin
      for (int ne = 0; ne <= 1; ne++) run(1, ne);
      for (int ne = 0; ne <= 3; ne++) run(3, ne);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
