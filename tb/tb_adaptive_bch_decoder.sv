// tb_adaptive_bch_decoder: end-to-end test of the adaptive 4-path decoder.
//
// Phase 1 (latency): a single word with n_EEB = 1 on an idle decoder must come out of
// BCH1, corrected, 1025 clock edges after the edge that accepted it; one n_EEB = 0 word must come out of
// the bypass the next cycle.
// Phase 2 (traffic): a stream of random codewords with random temperatures. The number of
// injected errors never exceeds the estimate, so every word with n_EEB = 1..7 must come back
// corrected with the original codeword; n_EEB = 0 words come back unchanged from the bypass;
// n_EEB > 7 words come back unchanged with out_fail. Every result is matched by tag.
// The test counts the mechanisms of the design and fails if one never happened: bypass,
// uncorrectable, each path, a word sent to a stronger path because its own was busy, a word
// parked in the storage buffer, a full buffer refusing input, and parallel decoding.
module tb_adaptive_bch_decoder;
  import bch_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid = 0, in_ready;
  logic [NN-1:0] in_word = '0;
  logic [7:0]    in_tag = 0, in_temp = 0;
  logic          cfg_we = 0;
  logic [2:0]    cfg_idx = 0;
  logic [7:0]    cfg_thr = 0;
  logic          out_valid, out_ready = 1;
  logic [NN-1:0] out_word;
  logic [KK-1:0] out_data;
  logic [7:0]    out_tag;
  logic [2:0]    out_path, out_nerr;
  logic          out_fail;
  logic [3:0]    out_neeb, path_busy;
  logic [2:0]    buf_count;

  adaptive_bch_decoder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // temperature giving each n_EEB with the reset threshold table
  int temp_of [9] = '{40, 55, 65, 75, 82, 87, 92, 97, 110};

  logic [NN-1:0] orig [256];
  logic [NN-1:0] sent [256];
  int            neeb_of [256];
  int            nerr_of [256];
  bit            pending [256];
  int            n_out = 0;

  // mechanism counters
  int n_bypass = 0, n_uncorr = 0, n_path [5] = '{0, 0, 0, 0, 0}, n_fallback = 0;
  int n_buffered_cycles = 0, n_refused = 0, n_parallel = 0;

  function automatic int natural_path(int n);
    return (n <= 1) ? 1 : (n <= 3) ? 2 : (n <= 5) ? 3 : 4;
  endfunction

  // output back-pressure: random during traffic, always ready while draining
  bit drain = 0, stall_out = 0;
  always @(posedge clk) out_ready <= drain || !stall_out || ($urandom_range(99) < 90);

  // scoreboard
  always @(negedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      int g;
      g = int'(out_tag);
      check(pending[g], $sformatf("result for tag %0d expected", g));
      pending[g] = 0;
      n_out++;
      check(int'(out_neeb) == neeb_of[g], "n_EEB returned");
      if (neeb_of[g] == 0) begin
        n_bypass++;
        check(out_path == 3'd0 && !out_fail && out_word == sent[g], "bypass word unchanged");
      end else if (neeb_of[g] > 7) begin
        n_uncorr++;
        check(out_path == 3'd7 && out_fail && out_word == sent[g], "uncorrectable word flagged");
      end else begin
        n_path[out_path]++;
        check(out_path >= 3'(natural_path(neeb_of[g])) && out_path <= 3'd4, "path strong enough");
        if (int'(out_path) > natural_path(neeb_of[g])) n_fallback++;
        check(!out_fail, $sformatf("tag %0d no failure", g));
        check(out_word == orig[g], $sformatf("tag %0d corrected (neeb %0d, %0d errors, path %0d)", g, neeb_of[g], nerr_of[g], out_path));
        check(out_data == orig[g][NN-1 -: KK], "data bits");
        check(int'(out_nerr) == nerr_of[g], "error count");
      end
    end
    if (buf_count != 0) n_buffered_cycles++;
    if (in_valid && !in_ready) n_refused++;
    if ($countones(path_busy) >= 2) n_parallel++;
  end

  task automatic send(int g, int neeb, int ne);
    orig[g]    = encode(rand_data());
    sent[g]    = add_errors(orig[g], ne);
    neeb_of[g] = neeb;
    nerr_of[g] = ne;
    pending[g] = 1;
    in_valid = 1; in_word = sent[g]; in_tag = 8'(g); in_temp = 8'(temp_of[neeb]);
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 in_valid = 0;
  endtask

  initial begin
    int g, lat;
    init();
    foreach (pending[i]) pending[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- phase 1: latency of an isolated word on BCH1 and of the bypass
    fork
      send(0, 1, 1);
      begin
        @(posedge clk); #1;
        lat = 0;
        while (!out_valid) begin @(posedge clk); #1; lat++; end
        check(lat == 1025, $sformatf("BCH1 latency %0d expected 1025", lat));
      end
    join
    @(negedge clk);
    send(1, 0, 0);
    #1 check(out_valid && out_path == 3'd0, "bypass result in the next cycle");
    repeat (3) @(negedge clk);

    // ---- phase 2: random traffic
    stall_out = 1;
    g = 2;
    for (int i = 0; i < 120; i++) begin
      int neeb, ne;
      int r;
      r = $urandom_range(99);
      neeb = (r < 8) ? 0 : (r < 12) ? 8 : (r < 50) ? $urandom_range(3, 1) : $urandom_range(7, 4);
      ne = (neeb == 0 || neeb > 7) ? 0 : $urandom_range(neeb, 0);
      while (pending[g % 256]) @(negedge clk);
      send(g % 256, neeb, ne);
      g++;
      if ($urandom_range(99) < 10) repeat ($urandom_range(300)) @(negedge clk);
    end
    drain = 1;
    // drain
    for (int w = 0; w < 20000; w++) begin
      bit any;
      any = 0;
      foreach (pending[i]) if (pending[i]) any = 1;
      if (!any) break;
      @(negedge clk);
    end
    foreach (pending[i]) check(!pending[i], $sformatf("tag %0d never returned", i));
    $display("mechanisms: bypass=%0d uncorrectable=%0d bch1=%0d bch2=%0d bch3=%0d bch4=%0d fallback=%0d buffered_cycles=%0d refused_cycles=%0d parallel_cycles=%0d",
             n_bypass, n_uncorr, n_path[1], n_path[2], n_path[3], n_path[4], n_fallback, n_buffered_cycles, n_refused, n_parallel);
    check(n_bypass > 0, "bypass used");
    check(n_uncorr > 0, "uncorrectable flagged");
    for (int p = 1; p <= 4; p++) check(n_path[p] > 0, $sformatf("BCH%0d used", p));
    check(n_fallback > 0, "stronger path used when the natural one was busy");
    check(n_buffered_cycles > 0, "storage buffer used");
    check(n_refused > 0, "full buffer refused a word");
    check(n_parallel > 0, "parallel decoding");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
