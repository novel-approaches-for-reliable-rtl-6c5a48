// tb_bch_chien: builds locators Lambda(x) = prod(1 + alpha^p x) for random sets of 0..7
// positions p, runs the Chien search and checks that exactly those positions are reported
// as roots and that the search takes N = 511 cycles.
module tb_bch_chien;
  import bch_tb_pkg::*;
  import gf9_pkg::gf_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start = 0, root_valid, root, done;
  logic [8:0] pos;
  gf_t        lambda [8];

  bch_chien #(.T(7)) dut (.clk, .rst_n, .start, .lambda, .root_valid, .root, .pos, .done);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(int ne);
    int p [$];
    int unsigned c [9];
    bit expect_root [NN];
    bit seen [NN];
    int cyc, nroots;
    rand_positions(ne, p);
    locator(p, c);
    foreach (expect_root[i]) begin expect_root[i] = 0; seen[i] = 0; end
    foreach (p[k]) expect_root[p[k]] = 1;
    @(negedge clk);
    for (int i = 0; i < 8; i++) lambda[i] = gf_t'(c[i]);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0; nroots = 0;
    while (!done && cyc < 600) begin
      if (root_valid) begin
        cyc++;
        seen[pos] = 1;
        if (root) begin
          nroots++;
          check(expect_root[pos], $sformatf("unexpected root at %0d", pos));
        end
      end
      @(negedge clk);
    end
    check(cyc == NN, $sformatf("candidates tested %0d", cyc));
    check(nroots == ne, $sformatf("roots %0d expected %0d", nroots, ne));
    foreach (seen[i]) if (!seen[i]) begin check(0, $sformatf("position %0d never tested", i)); break; end
  endtask

  initial begin
    init();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int ne = 0; ne <= 7; ne++) run(ne);
    run(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
