// tb_eqsng_edge_detector: self-checking test of the EQSNG edge detector.
//
// Random 2x2 windows are processed with a stand-in accuracy verdict (target met once a
// chosen cycle count is reached) or none (run to max_cycles). An independent bit-level
// model (bit-reversed counter for dimension 0, Sobol dimension-1 table for the select
// stream, comparators, Roberts cross) gives the exact ones count for the cycles used;
// cycles, ones and energy must match. Full 256-cycle runs must also be within a few units
// of the exact (|p00-p11| + |p01-p10|) / 2. Direction vectors are rewritten once to check
// that the RAM feeds the generator. Both endings (early stop and limit) must occur.
module tb_eqsng_edge_detector;

  localparam int NB = 8, PW = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            start, target_met, dv_we, dv_dim, done, hit_limit;
  logic [2:0]      dv_idx;
  logic [NB-1:0]   p00, p01, p10, p11, dv_data;
  logic [NB:0]     max_cycles, ones, cycles;
  logic [PW-1:0]   power;
  logic [PW+NB:0]  energy;

  eqsng_edge_detector dut (.*);

  int checks = 0, failures = 0, early = 0, limited = 0;
  int n_target;
  int table_cycles [10] = '{4, 7, 10, 13, 18, 26, 47, 53, 77, 80};
  logic [7:0] v [2][8] = '{'{8'd128, 8'd64, 8'd32, 8'd16, 8'd8, 8'd4, 8'd2, 8'd1},
                           '{8'd128, 8'd192, 8'd160, 8'd240, 8'd136, 8'd204, 8'd170, 8'd255}};

  assign target_met = (n_target >= 0) && (int'(cycles) >= n_target);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int model_ones(int n, int a00, int a01, int a10, int a11);
    int r;
    r = 0;
    for (int c = 0; c < n; c++) begin
      int u0, u1;
      bit s00, s01, s10, s11, sl;
      u0 = 0; u1 = 0;
      for (int k = 0; k < 8; k++) if (((c >> k) & 1) != 0) begin u0 ^= int'(v[0][k]); u1 ^= int'(v[1][k]); end
      s00 = (u0 < a00); s01 = (u0 < a01); s10 = (u0 < a10); s11 = (u0 < a11);
      sl = (u1 < 128);
      r += sl ? int'(s00 ^ s11) : int'(s01 ^ s10);
    end
    return r;
  endfunction

  task automatic run_window(int lim, int tgt, bit full_check);
    int tmo, exp_c, exp_o, exact2;
    int unsigned pw;
    p00 = 8'($urandom); p01 = 8'($urandom); p10 = 8'($urandom); p11 = 8'($urandom);
    if ($urandom_range(3) == 0) begin p01 = p00; p10 = p00; p11 = p00; end   // flat window
    pw = $urandom_range(65535);
    power = 16'(pw);
    max_cycles = 9'(lim);
    n_target = tgt;
    start = 1;
    @(negedge clk);
    start = 0;
    tmo = 0;
    while (!done && tmo < 1000) begin @(negedge clk); tmo++; end
    exp_c = (tgt >= 0 && tgt <= lim) ? ((tgt == 0) ? 1 : tgt) : lim;
    exp_o = model_ones(exp_c, p00, p01, p10, p11);
    check(done, "finished");
    check(int'(cycles) == exp_c, $sformatf("cycles %0d expected %0d", cycles, exp_c));
    check(int'(ones) == exp_o, $sformatf("ones %0d expected %0d after %0d cycles (%0d %0d %0d %0d)", ones, exp_o, exp_c, p00, p01, p10, p11));
    check(energy == (PW+NB+1)'(pw) * (PW+NB+1)'(exp_c), "energy = power x cycles");
    if (hit_limit) limited++; else early++;
    if (full_check && exp_c == 256) begin
      exact2 = ((p00 > p11) ? p00 - p11 : p11 - p00) + ((p01 > p10) ? p01 - p10 : p10 - p01);
      check(2 * int'(ones) - exact2 <= 8 && exact2 - 2 * int'(ones) <= 8,
            $sformatf("256-cycle estimate %0d vs exact %0d/2", ones, exact2));
    end
  endtask

  initial begin
    start = 0; dv_we = 0; dv_dim = 0; dv_idx = 0; dv_data = 0; power = 0; max_cycles = 0; n_target = -1;
    p00 = 0; p01 = 0; p10 = 0; p11 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 40; it++) run_window(256, -1, 1);
    for (int it = 0; it < 60; it++) begin
      int lim;
      lim = $urandom_range(256, 1);
      run_window(lim, ($urandom_range(2) == 0) ? -1 : $urandom_range(lim + 10, 0), 0);
    end
    // the table's target cycle counts (4..80 clock cycles)
    foreach (table_cycles[i]) run_window(256, table_cycles[i], 0);
    // rewrite dimension 1 with other vectors
    for (int k = 0; k < 8; k++) begin
      dv_we = 1; dv_dim = 1; dv_idx = 3'(k); dv_data = 8'($urandom) | 8'(1 << (7 - k));
      v[1][k] = dv_data;
      @(negedge clk);
    end
    dv_we = 0;
    for (int it = 0; it < 20; it++) run_window($urandom_range(256, 1), -1, 0);
    check(early > 0 && limited > 0, "both early stop and cycle limit exercised");
    $display("early=%0d limited=%0d", early, limited);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
