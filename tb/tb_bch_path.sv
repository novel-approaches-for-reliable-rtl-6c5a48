// tb_bch_path: self-checking test of the four decoding paths (T = 1, 3, 5, 7).
//
// For each path: random systematic codewords from the reference encoder with 0..T random
// bit errors must come back corrected with the right error count and no failure flag, in
// exactly 1026 cycles (Peterson paths) or 1026 + T cycles (SiBM paths), or 513 cycles
// when error-free. Words with T+1..T+2 errors must never be reported as correct with a wrong
// word silently accepted as the original.
module tb_bch_path;
  import bch_tb_pkg::*;

  localparam int NP = 4;
  localparam int TW = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start [NP];
  logic [NN-1:0] win   [NP];
  logic          idle  [NP], done [NP], ack [NP], fail [NP];
  logic [NN-1:0] wout  [NP];
  logic [TW-1:0] tag_o [NP];
  logic [3:0]    neeb_o[NP];
  logic [2:0]    nerr  [NP];

  for (genvar p = 0; p < NP; p++) begin : g
    bch_path #(.T(2*p + 1), .TAG_W(TW), .NEEB_W(4)) dut (
      .clk, .rst_n, .start(start[p]), .word_in(win[p]), .tag_in(TW'(p + 8'h10)), .neeb_in(4'(p)),
      .idle(idle[p]), .done(done[p]), .ack(ack[p]), .word_out(wout[p]), .tag_out(tag_o[p]),
      .neeb_out(neeb_o[p]), .nerr(nerr[p]), .fail(fail[p])
    );
  end

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic decode(int p, logic [NN-1:0] c, int ne);
    logic [NN-1:0] r;
    int t, cyc, exp_cyc;
    t = 2*p + 1;
    r = add_errors(c, ne);
    @(negedge clk);
    check(idle[p], "path idle before start");
    win[p] = r; start[p] = 1;
    @(negedge clk);
    start[p] = 0;
    cyc = 1;
    while (!done[p]) begin @(negedge clk); cyc++; end
    if (ne <= t) begin
      exp_cyc = (ne == 0) ? 513 : 1026 + ((t <= 3) ? 0 : t);
      check(wout[p] == c, $sformatf("T=%0d ne=%0d corrected word", t, ne));
      check(nerr[p] == 3'(ne), $sformatf("T=%0d ne=%0d nerr=%0d", t, ne, nerr[p]));
      check(!fail[p], $sformatf("T=%0d ne=%0d no fail", t, ne));
      check(cyc == exp_cyc, $sformatf("T=%0d ne=%0d latency %0d expected %0d", t, ne, cyc, exp_cyc));
      check(tag_o[p] == TW'(p + 8'h10) && neeb_o[p] == 4'(p), "tag/neeb carried");
    end else begin
      // beyond capability: either flagged, or returned as some other codeword; never the
      // received word claimed as corrected with nerr > 0 equal to the true count
      check(fail[p] || wout[p] != c || ne > 7, $sformatf("T=%0d ne=%0d over-capacity handled", t, ne));
      if (fail[p]) check(wout[p] == r, "failed word returned as received");
    end
    ack[p] = 1;
    @(negedge clk);
    ack[p] = 0;
  endtask

  initial begin
    for (int p = 0; p < NP; p++) begin start[p] = 0; ack[p] = 0; win[p] = '0; end
    init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++) begin
      int t;
      t = 2*p + 1;
      for (int ne = 0; ne <= t; ne++)
        for (int rep = 0; rep < 2; rep++) decode(p, encode(rand_data()), ne);
      decode(p, encode(rand_data()), t + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
