// tb_bch_parallel_workload: parallel-decoding workload of the adaptive 4-path BCH decoder.
//
// Three decoders with storage buffers of 4, 8 and 16 words run side by side. Each one reads
// the same grid of nine traffic mixes: hot/cold bit-error probabilities 0.003/0.002,
// 0.009/0.002 and 0.011/0.005, each with 40/60, 60/40 and 80/20 percent of the words read
// from the hot region. Per mix, WORDS random codewords are offered back to back, as from a
// memory read stream that only stalls while the decoder refuses input. Each word is hot with
// probability f_hot. Its error count is drawn bit by bit with the region's probability,
// which gives a binomial count over 511 bits.
//
// The temperature sensors are modelled as exact: each word arrives with a temperature whose
// n_EEB estimate equals its true error count, using the estimator's reset threshold table.
// The estimate is therefore never too small, so every word with 1..7 errors must come back
// corrected. Words with no errors must pass through the bypass unchanged. Words with more
// than 7 errors must come back unchanged with out_fail set.
//
// Reported per size and mix: the average latency in clock cycles from the edge that accepts
// a word to the cycle its result is valid, and the cycles spent on the whole mix. Checked:
// every result, every word returned, each buffer filled to its full size, and the heaviest
// mix slower on average than the lightest.
module tb_bch_parallel_workload;
  import bch_tb_pkg::*;

  localparam int NS    = 3;      // buffer sizes 4, 8, 16
  localparam int NMIX  = 9;
  localparam int WORDS = 100;

  // bit-error probabilities in units of 1e-6: {hot, cold} per pair; f_hot in percent
  localparam int P_HOT  [3] = '{3000, 9000, 11000};
  localparam int P_COLD [3] = '{2000, 2000, 5000};
  localparam int F_HOT  [3] = '{40, 60, 80};

  // a temperature giving each n_EEB (index 8: more than 7) with the reset threshold table
  localparam int TEMP_OF [9] = '{40, 55, 65, 75, 82, 87, 92, 97, 110};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc++;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // results per size and mix
  longint lat_sum  [NS][NMIX];
  int     n_words  [NS][NMIX];
  int     mix_cyc  [NS][NMIX];
  int     max_fill [NS];
  bit     fin      [NS];

  function automatic int draw_errors(int p_ppm);
    int n;
    n = 0;
    for (int i = 0; i < NN; i++) if ($urandom_range(999999) < p_ppm) n++;
    return n;
  endfunction

  for (genvar s = 0; s < NS; s++) begin : g
    localparam int SB = 4 << s;

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
    logic [$clog2(SB+1)-1:0] buf_count;

    adaptive_bch_decoder #(.SIZE_BUF(SB)) dut (.*);

    logic [NN-1:0] orig [256];
    logic [NN-1:0] sent [256];
    int            ne_of [256];
    int            t_acc [256];
    bit            pending [256];
    int            mix = 0;

    // scoreboard
    always @(negedge clk) if (rst_n) begin
      if (int'(buf_count) > max_fill[s]) max_fill[s] = int'(buf_count);
      if (out_valid && out_ready) begin
        int k;
        k = int'(out_tag);
        check(pending[k], $sformatf("size %0d: result for tag %0d expected", SB, k));
        pending[k] = 0;
        lat_sum[s][mix] += longint'(cyc) - longint'(t_acc[k]);
        n_words[s][mix]++;
        if (ne_of[k] == 0) begin
          check(out_path == 3'd0 && !out_fail && out_word == sent[k], "error-free word bypassed unchanged");
        end else if (ne_of[k] > 7) begin
          check(out_path == 3'd7 && out_fail && out_word == sent[k], "word beyond 7 errors flagged");
        end else begin
          check(!out_fail && out_word == orig[k] && int'(out_nerr) == ne_of[k],
                $sformatf("size %0d tag %0d: %0d errors corrected on path %0d", SB, k, ne_of[k], out_path));
        end
      end
    end

    initial begin
      int k, t0;
      k = 0;
      foreach (pending[i]) pending[i] = 0;
      wait (rst_n);
      @(negedge clk);
      for (int m = 0; m < NMIX; m++) begin
        mix = m;
        t0 = cyc;
        for (int w = 0; w < WORDS; w++) begin
          int ne;
          ne = draw_errors(($urandom_range(99) < F_HOT[m % 3]) ? P_HOT[m / 3] : P_COLD[m / 3]);
          while (pending[k]) @(negedge clk);
          orig[k]  = encode(rand_data());
          sent[k]  = add_errors(orig[k], ne);
          ne_of[k] = ne;
          pending[k] = 1;
          in_valid = 1; in_word = sent[k]; in_tag = 8'(k); in_temp = 8'(TEMP_OF[(ne > 8) ? 8 : ne]);
          #1;
          while (!in_ready) begin @(negedge clk); #1; end
          t_acc[k] = cyc + 1;          // accepted at the coming edge
          @(negedge clk);
          in_valid = 0;
          k = (k + 1) % 256;
        end
        // let the mix drain before the next one starts
        for (int w = 0; w < 50000; w++) begin
          bit any;
          any = 0;
          foreach (pending[i]) if (pending[i]) any = 1;
          if (!any) break;
          @(negedge clk);
        end
        mix_cyc[s][m] = cyc - t0;
      end
      foreach (pending[i]) check(!pending[i], $sformatf("size %0d: tag %0d never returned", SB, i));
      fin[s] = 1;
    end
  end

  initial begin
    foreach (max_fill[i]) begin max_fill[i] = 0; fin[i] = 0; end
    foreach (lat_sum[i, j]) begin lat_sum[i][j] = 0; n_words[i][j] = 0; mix_cyc[i][j] = 0; end
    init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2]);
    $display("p_hot/p_cold  size  f_hot/f_cold  words  avg_latency_cycles  mix_cycles");
    for (int s = 0; s < NS; s++)
      for (int m = 0; m < NMIX; m++)
        $display("%0d.%03d/%0d.%03d  %4d  %0d/%0d  %5d  %10.1f  %8d",
                 P_HOT[m / 3] / 1000000, (P_HOT[m / 3] / 1000) % 1000,
                 P_COLD[m / 3] / 1000000, (P_COLD[m / 3] / 1000) % 1000,
                 4 << s, F_HOT[m % 3], 100 - F_HOT[m % 3], n_words[s][m],
                 real'(lat_sum[s][m]) / real'((n_words[s][m] > 0) ? n_words[s][m] : 1), mix_cyc[s][m]);
    for (int s = 0; s < NS; s++) begin
      for (int m = 0; m < NMIX; m++) check(n_words[s][m] == WORDS, "all words of the mix returned");
      check(max_fill[s] == (4 << s), $sformatf("buffer of %0d filled (max %0d)", 4 << s, max_fill[s]));
      check(lat_sum[s][NMIX-1] > lat_sum[s][0], "heaviest mix slower than the lightest");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
