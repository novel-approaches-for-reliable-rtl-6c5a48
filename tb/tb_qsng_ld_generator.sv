// tb_qsng_ld_generator: self-checking test of the LD number generator.
//
// With the Sobol vectors, dimension 0 over one 256-cycle period must be the bit-reversed
// counter (every value once), and both dimensions must match an XOR-of-vectors reference
// for random vectors, with `clear` restarting the sequence and `inc` low holding it.
module tb_qsng_ld_generator;

  localparam int NB = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          clear, inc;
  logic [NB-1:0] vec [2][NB];
  logic [NB-1:0] ld  [2];

  qsng_ld_generator dut (.clk, .rst_n, .clear, .inc, .vec, .ld);

  int checks = 0, failures = 0;
  int unsigned cnt_m;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [NB-1:0] ref_ld(int d, int unsigned c);
    logic [NB-1:0] r;
    r = '0;
    for (int k = 0; k < NB; k++) if (c[k]) r ^= vec[d][k];
    return r;
  endfunction

  initial begin
    bit seen [256];
    clear = 0; inc = 0;
    for (int k = 0; k < NB; k++) begin vec[0][k] = 8'(1 << (NB - 1 - k)); vec[1][k] = 8'($urandom); end
    repeat (2) @(negedge clk);
    rst_n = 1;
    cnt_m = 0;
    foreach (seen[i]) seen[i] = 0;
    inc = 1;
    for (int c = 0; c < 256; c++) begin
      logic [NB-1:0] rev;
      for (int k = 0; k < NB; k++) rev[NB-1-k] = c[k];
      check(ld[0] == rev, $sformatf("van der Corput value at %0d", c));
      check(ld[1] == ref_ld(1, c), $sformatf("dim 1 at %0d", c));
      check(!seen[ld[0]], "dimension 0 repeats within a period");
      seen[ld[0]] = 1;
      @(negedge clk);
    end
    cnt_m = 0;
    for (int i = 0; i < 2000; i++) begin
      clear = ($urandom_range(40) == 0);
      inc = ($urandom_range(3) != 0);
      if ($urandom_range(100) == 0) for (int k = 0; k < NB; k++) vec[$urandom_range(1)][k] = 8'($urandom);
      #1;
      check(ld[0] == ref_ld(0, cnt_m) && ld[1] == ref_ld(1, cnt_m), $sformatf("random step %0d", i));
      @(negedge clk);
      if (clear) cnt_m = 0; else if (inc) cnt_m = (cnt_m + 1) % 256;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
