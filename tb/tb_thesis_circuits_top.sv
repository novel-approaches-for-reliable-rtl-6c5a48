// tb_thesis_circuits_top: end-to-end test of the top level at its default (full) size,
// exercising the three designs at the same time.
//
// Adaptive BCH decoder: random codewords with random temperatures (errors never above the
// estimate) must come back corrected and tagged; n_EEB = 0 through the bypass, n_EEB > 7
// flagged uncorrectable. NCL adder pipeline: a four-phase sender and a slower receiver
// exchange operand sets and sums through DATA and NULL wavefronts. EQSNG edge detector:
// 2x2 windows run until a stand-in accuracy verdict or the cycle limit, and the ones count
// must match a bit-level model. The stand-alone TH24comp gate is driven with random inputs
// and compared with its set/hold rule.
// The test counts every mechanism (bypass, uncorrectable, each BCH path, stronger-path
// fallback, storage buffer use, input refusal, parallel decoding, DATA and NULL
// wavefronts, two NCL operand sets in flight, EQSNG early stop and cycle limit, TH24comp
// set and hold) and fails
// if any of them never happened.
module tb_thesis_circuits_top;
  import bch_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // BCH
  logic          bch_in_valid = 0, bch_in_ready;
  logic [NN-1:0] bch_in_word = '0;
  logic [7:0]    bch_in_tag = 0, bch_in_temp = 0;
  logic          bch_cfg_we = 0;
  logic [2:0]    bch_cfg_idx = 0;
  logic [7:0]    bch_cfg_thr = 0;
  logic          bch_out_valid, bch_out_ready = 1;
  logic [NN-1:0] bch_out_word;
  logic [KK-1:0] bch_out_data;
  logic [7:0]    bch_out_tag;
  logic [2:0]    bch_out_path, bch_out_nerr;
  logic          bch_out_fail;
  logic [3:0]    bch_out_neeb, bch_path_busy;
  logic [2:0]    bch_buf_count;
  // NCL
  logic          ncl_rst = 1, ncl_ko, ncl_ki = 1;
  logic [3:0][1:0] ncl_a = '0, ncl_b = '0, ncl_s;
  logic [1:0]    ncl_ci = '0, ncl_co;
  logic [3:0]    th24_a = '0;
  logic          th24_z;
  // EQSNG
  logic          eq_start = 0, eq_target_met, eq_dv_we = 0, eq_dv_dim = 0, eq_done, eq_hit_limit;
  logic [2:0]    eq_dv_idx = 0;
  logic [7:0]    eq_p00 = 0, eq_p01 = 0, eq_p10 = 0, eq_p11 = 0, eq_dv_data = 0;
  logic [8:0]    eq_max_cycles = 0, eq_ones, eq_cycles;
  logic [15:0]   eq_power = 0;
  logic [24:0]   eq_energy;

  thesis_circuits_top dut (.*);

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
  always @(posedge clk) bch_out_ready <= drain || !stall_out || ($urandom_range(99) < 90);

  // scoreboard
  always @(negedge clk) if (rst_n) begin
    if (bch_out_valid && bch_out_ready) begin
      int g;
      g = int'(bch_out_tag);
      check(pending[g], $sformatf("result for tag %0d expected", g));
      pending[g] = 0;
      n_out++;
      check(int'(bch_out_neeb) == neeb_of[g], "n_EEB returned");
      if (neeb_of[g] == 0) begin
        n_bypass++;
        check(bch_out_path == 3'd0 && !bch_out_fail && bch_out_word == sent[g], "bypass word unchanged");
      end else if (neeb_of[g] > 7) begin
        n_uncorr++;
        check(bch_out_path == 3'd7 && bch_out_fail && bch_out_word == sent[g], "uncorrectable word flagged");
      end else begin
        n_path[bch_out_path]++;
        check(bch_out_path >= 3'(natural_path(neeb_of[g])) && bch_out_path <= 3'd4, "path strong enough");
        if (int'(bch_out_path) > natural_path(neeb_of[g])) n_fallback++;
        check(!bch_out_fail, $sformatf("tag %0d no failure", g));
        check(bch_out_word == orig[g], $sformatf("tag %0d corrected (neeb %0d, %0d errors, path %0d)", g, neeb_of[g], nerr_of[g], bch_out_path));
        check(bch_out_data == orig[g][NN-1 -: KK], "data bits");
        check(int'(bch_out_nerr) == nerr_of[g], "error count");
      end
    end
    if (bch_buf_count != 0) n_buffered_cycles++;
    if (bch_in_valid && !bch_in_ready) n_refused++;
    if ($countones(bch_path_busy) >= 2) n_parallel++;
  end

  task automatic send(int g, int neeb, int ne);
    orig[g]    = encode(rand_data());
    sent[g]    = add_errors(orig[g], ne);
    neeb_of[g] = neeb;
    nerr_of[g] = ne;
    pending[g] = 1;
    bch_in_valid = 1; bch_in_word = sent[g]; bch_in_tag = 8'(g); bch_in_temp = 8'(temp_of[neeb]);
    @(posedge clk);
    while (!bch_in_ready) @(posedge clk);
    #1 bch_in_valid = 0;
  endtask


  // ------------------------------------------------------------------ NCL
  int ncl_sent = 0, ncl_rcv = 0, ncl_null = 0, ncl_overlap = 0;
  logic [4:0] ncl_expq [$];
  logic ncl_odata, ncl_onull;
  always_comb begin
    ncl_odata = (ncl_co == 2'b01 || ncl_co == 2'b10);
    ncl_onull = (ncl_co == 2'b00);
    for (int i = 0; i < 4; i++) begin
      ncl_odata &= (ncl_s[i] == 2'b01 || ncl_s[i] == 2'b10);
      ncl_onull &= (ncl_s[i] == 2'b00);
    end
  end

  function automatic logic [1:0] dr(bit v);
    return v ? 2'b10 : 2'b01;
  endfunction

  localparam int NCL_TOK = 300;

  task automatic ncl_sender();
    for (int t = 0; t < NCL_TOK; t++) begin
      logic [3:0] av, bv;
      bit cv;
      wait (ncl_ko == 1'b1);
      #($urandom_range(3) + 1);
      {cv, av, bv} = 9'($urandom);
      ncl_expq.push_back(5'(av) + 5'(bv) + 5'(cv));
      if (ncl_odata) ncl_overlap++;
      ncl_sent++;
      for (int i = 0; i < 4; i++) begin ncl_a[i] = dr(av[i]); #1; ncl_b[i] = dr(bv[i]); end
      ncl_ci = dr(cv);
      wait (ncl_ko == 1'b0);
      #($urandom_range(3) + 1);
      ncl_a = '0; ncl_b = '0; ncl_ci = '0;
    end
  endtask

  task automatic ncl_receiver();
    for (int t = 0; t < NCL_TOK; t++) begin
      logic [4:0] v;
      wait (ncl_odata);
      #1;
      for (int i = 0; i < 4; i++) v[i] = ncl_s[i][1];
      v[4] = ncl_co[1];
      check(ncl_expq.size() > 0 && v == ncl_expq[0], $sformatf("NCL sum %0d", t));
      if (ncl_expq.size() > 0) void'(ncl_expq.pop_front());
      ncl_rcv++;
      #($urandom_range(((t / 40) % 2 == 1) ? 30 : 3) + 1);
      ncl_ki = 0;
      wait (ncl_onull);
      ncl_null++;
      #($urandom_range(3) + 1);
      ncl_ki = 1;
    end
  endtask

  // ------------------------------------------------------------------ EQSNG
  int eq_target = -1, eq_early = 0, eq_limited = 0;
  logic [7:0] sob [2][8] = '{'{8'd128, 8'd64, 8'd32, 8'd16, 8'd8, 8'd4, 8'd2, 8'd1},
                             '{8'd128, 8'd192, 8'd160, 8'd240, 8'd136, 8'd204, 8'd170, 8'd255}};
  assign eq_target_met = (eq_target >= 0) && (int'(eq_cycles) >= eq_target);

  function automatic int eq_model(int n, int a00, int a01, int a10, int a11);
    int r;
    r = 0;
    for (int c = 0; c < n; c++) begin
      int u0, u1;
      u0 = 0; u1 = 0;
      for (int k = 0; k < 8; k++) if (((c >> k) & 1) != 0) begin u0 ^= int'(sob[0][k]); u1 ^= int'(sob[1][k]); end
      if (u1 < 128) r += int'((u0 < a00) != (u0 < a11));
      else          r += int'((u0 < a01) != (u0 < a10));
    end
    return r;
  endfunction

  task automatic eq_runs();
    // the cycle counts of the design's table (PSNR 22.2 .. 40.3 dB)
    int tbl [18] = '{7, 10, 14, 26, 47, 77, 4, 7, 10, 19, 30, 53, 8, 13, 18, 28, 45, 80};
    for (int it = 0; it < 30; it++) begin
      int lim, exp_c, tmo;
      int unsigned pw;
      lim = (it % 3 == 2) ? $urandom_range(100, 20) : 256;
      eq_target = (it % 3 == 2) ? -1 : tbl[it % 18];
      eq_p00 = 8'($urandom); eq_p01 = 8'($urandom); eq_p10 = 8'($urandom); eq_p11 = 8'($urandom);
      pw = $urandom_range(65535);
      eq_power = 16'(pw);
      eq_max_cycles = 9'(lim);
      @(negedge clk);
      eq_start = 1;
      @(negedge clk);
      eq_start = 0;
      tmo = 0;
      while (!eq_done && tmo < 1000) begin @(negedge clk); tmo++; end
      exp_c = (eq_target >= 0 && eq_target <= lim) ? eq_target : lim;
      check(eq_done && int'(eq_cycles) == exp_c, $sformatf("EQSNG cycles %0d expected %0d", eq_cycles, exp_c));
      check(int'(eq_ones) == eq_model(exp_c, eq_p00, eq_p01, eq_p10, eq_p11), "EQSNG ones count");
      check(eq_energy == 25'(pw) * 25'(exp_c), "EQSNG energy");
      if (eq_hit_limit) eq_limited++; else eq_early++;
    end
  endtask

  // ------------------------------------------------------------------ TH24comp gate
  int th24_sets = 0, th24_holds = 0;
  task automatic th24_test();
    bit zm;
    zm = 0;
    for (int i = 0; i < 200; i++) begin
      th24_a = 4'($urandom);
      if ($urandom_range(3) == 0) th24_a = '0;
      #1;
      if ((th24_a[0] | th24_a[1]) & (th24_a[2] | th24_a[3])) begin zm = 1; th24_sets++; end
      else if (th24_a == '0) zm = 0;
      else if (zm) th24_holds++;
      check(th24_z == zm, $sformatf("TH24comp a=%b", th24_a));
    end
  endtask

  // ------------------------------------------------------------------ BCH traffic
  task automatic bch_traffic();
    int g;
    stall_out = 1;
    g = 0;
    for (int i = 0; i < 90; i++) begin
      int neeb, ne, r;
      r = $urandom_range(99);
      neeb = (r < 8) ? 0 : (r < 12) ? 8 : (r < 50) ? $urandom_range(3, 1) : $urandom_range(7, 4);
      ne = (neeb == 0 || neeb > 7) ? 0 : $urandom_range(neeb, 0);
      while (pending[g % 256]) @(negedge clk);
      send(g % 256, neeb, ne);
      g++;
      if ($urandom_range(99) < 10) repeat ($urandom_range(300)) @(negedge clk);
    end
    drain = 1;
    for (int w = 0; w < 20000; w++) begin
      bit any;
      any = 0;
      foreach (pending[i]) if (pending[i]) any = 1;
      if (!any) break;
      @(negedge clk);
    end
    foreach (pending[i]) check(!pending[i], $sformatf("tag %0d never returned", i));
  endtask

  initial begin
    init();
    foreach (pending[i]) pending[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    ncl_rst = 0;
    @(negedge clk);
    fork
      bch_traffic();
      begin ncl_sender(); end
      begin ncl_receiver(); end
      eq_runs();
      th24_test();
    join
    $display("BCH: bypass=%0d uncorrectable=%0d bch1=%0d bch2=%0d bch3=%0d bch4=%0d fallback=%0d buffered_cycles=%0d refused_cycles=%0d parallel_cycles=%0d",
             n_bypass, n_uncorr, n_path[1], n_path[2], n_path[3], n_path[4], n_fallback, n_buffered_cycles, n_refused, n_parallel);
    $display("NCL: data_waves=%0d null_waves=%0d overlap=%0d", ncl_rcv, ncl_null, ncl_overlap);
    $display("EQSNG: early_stop=%0d cycle_limit=%0d", eq_early, eq_limited);
    check(n_bypass > 0, "bypass used");
    check(n_uncorr > 0, "uncorrectable flagged");
    for (int p = 1; p <= 4; p++) check(n_path[p] > 0, $sformatf("BCH%0d used", p));
    check(n_fallback > 0, "stronger path used when the natural one was busy");
    check(n_buffered_cycles > 0, "storage buffer used");
    check(n_refused > 0, "full buffer refused a word");
    check(n_parallel > 0, "parallel decoding");
    check(ncl_rcv == NCL_TOK && ncl_null == NCL_TOK, "all NCL DATA and NULL wavefronts");
    check(ncl_overlap > 0, "two NCL operand sets in flight");
    check(eq_early > 0, "EQSNG stopped early on the accuracy verdict");
    check(eq_limited > 0, "EQSNG stopped at the cycle limit");
    check(th24_sets > 0 && th24_holds > 0, "TH24comp set and hold");
    $display("TH24comp: sets=%0d holds=%0d", th24_sets, th24_holds);
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
