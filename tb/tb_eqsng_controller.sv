// tb_eqsng_controller: self-checking test of the EQSNG run control (Algorithm 1).
//
// A stand-in accuracy check declares the target met once `cycles` reaches a chosen value
// n; the controller must then report exactly n cycles (n >= 1; a target met at 0 cycles
// still runs one), energy = power x cycles, and exactly that many `run` cycles after one
// `clear`. Runs whose target never comes must stop at max_cycles with hit_limit set.
// Both endings must occur.
module tb_eqsng_controller;

  localparam int NB = 8, PW = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            start, target_met, run, clear, done, hit_limit;
  logic [NB:0]     max_cycles, cycles;
  logic [PW-1:0]   power;
  logic [PW+NB:0]  energy;

  eqsng_controller dut (.clk, .rst_n, .start, .max_cycles, .target_met, .power,
                        .run, .clear, .done, .hit_limit, .cycles, .energy);

  int checks = 0, failures = 0, early = 0, limited = 0;
  int n_target, runs, clears;

  assign target_met = (n_target >= 0) && (int'(cycles) >= n_target);

  always @(posedge clk) begin
    if (run) runs++;
    if (clear) clears++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    start = 0; power = 0; max_cycles = 0; n_target = -1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      int lim, exp_c, tmo;
      bit exp_lim;
      lim = $urandom_range(256, 1);
      n_target = ($urandom_range(3) == 0) ? -1 : $urandom_range(lim + 5, 0);
      power = 16'($urandom);
      max_cycles = 9'(lim);
      runs = 0; clears = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      power = 16'($urandom);   // must have been latched at start
      tmo = 0;
      while (!done && tmo < 1000) begin @(negedge clk); tmo++; end
      if (n_target >= 0 && n_target <= lim) begin
        exp_c = (n_target == 0) ? 1 : n_target;   // the first cycle always runs
        exp_lim = 0;
      end else begin
        exp_c = lim;
        exp_lim = 1;
      end
      check(done, "run finished");
      check(int'(cycles) == exp_c, $sformatf("cycles %0d expected %0d (target %0d, limit %0d)", cycles, exp_c, n_target, lim));
      check(runs == exp_c, $sformatf("run pulses %0d expected %0d", runs, exp_c));
      check(clears == 1, "one clear per run");
      check(hit_limit == exp_lim, $sformatf("hit_limit %0d expected %0d", hit_limit, exp_lim));
      if (hit_limit) limited++; else early++;
      @(negedge clk);
      check(done, "done held");
    end
    check(early > 0 && limited > 0, "both early stop and limit exercised");
    $display("early=%0d limited=%0d", early, limited);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // energy check uses the power that was applied when start was sampled
  logic [PW-1:0] power_at_start;
  always @(posedge clk) if (start && (dut.st_q == dut.S_IDLE || dut.st_q == dut.S_DONE)) power_at_start <= power;
  always @(posedge done) begin
    #1;
    checks++;
    if (energy !== (PW+NB+1)'(power_at_start) * (PW+NB+1)'(cycles)) begin
      failures++; $display("FAIL: energy %0d expected %0d x %0d", energy, power_at_start, cycles);
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
