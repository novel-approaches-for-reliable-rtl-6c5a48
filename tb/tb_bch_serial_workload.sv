// tb_bch_serial_workload: serial-decoding workload of the adaptive 4-path BCH decoder.
//
// Words are decoded one at a time: the next word is offered only after the previous result
// has left. For each bit-error probability 0.04, 0.004, 0.0004 and 0.00004, WORDS random
// codewords are sent. Each gets a binomial error count, drawn bit by bit over 511 bits.
//
// As in tb_bch_parallel_workload, the temperature sensors are modelled as exact: n_EEB equals
// the true error count. Words with 1..7 errors must come back corrected on the fastest path
// able to correct them. Error-free words must take the bypass. Words with more than 7 errors
// must come back unchanged with out_fail set.
//
// Reported per probability: how many words took each route, and the average latency in
// clock cycles from the edge that accepts a word to the cycle its result is valid.
// Checked besides every result: at 0.04 nearly every word is uncorrectable, so the average
// latency is below that at 0.004; at 0.00004 nearly every word is error-free, so the average
// latency is below that at 0.0004.
module tb_bch_serial_workload;
  import bch_tb_pkg::*;

  localparam int NP    = 4;
  localparam int WORDS = 100;
  // bit-error probabilities in units of 1e-7
  localparam int P_BE [NP] = '{400000, 40000, 4000, 400};

  localparam int TEMP_OF [9] = '{40, 55, 65, 75, 82, 87, 92, 97, 110};

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

  function automatic int draw_errors(int p_e7);
    int n;
    n = 0;
    for (int i = 0; i < NN; i++) if ($urandom_range(9999999) < p_e7) n++;
    return n;
  endfunction

  // fastest path able to correct n errors
  function automatic int natural_path(int n);
    return (n == 0) ? 0 : (n <= 1) ? 1 : (n <= 3) ? 2 : (n <= 5) ? 3 : (n <= 7) ? 4 : 7;
  endfunction

  longint lat_sum [NP];
  int     routes  [NP][8];

  initial begin
    init();
    foreach (lat_sum[i]) lat_sum[i] = 0;
    foreach (routes[i, j]) routes[i][j] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      for (int w = 0; w < WORDS; w++) begin
        logic [NN-1:0] c, r;
        int ne, lat;
        ne = draw_errors(P_BE[p]);
        c = encode(rand_data());
        r = add_errors(c, ne);
        in_valid = 1; in_word = r; in_tag = 8'(w); in_temp = 8'(TEMP_OF[(ne > 8) ? 8 : ne]);
        #1;
        check(in_ready, "idle decoder takes the word");
        @(negedge clk);
        in_valid = 0;
        lat = 1;
        while (!out_valid) begin @(negedge clk); lat++; end
        lat_sum[p] += longint'(lat);
        routes[p][out_path]++;
        check(out_tag == 8'(w), "tag returned");
        check(int'(out_path) == natural_path(ne),
              $sformatf("%0d errors: path %0d expected %0d", ne, out_path, natural_path(ne)));
        if (ne > 7) check(out_fail && out_word == r, "uncorrectable word flagged and unchanged");
        else        check(!out_fail && out_word == c && int'(out_nerr) == ne,
                          $sformatf("%0d errors corrected", ne));
        @(negedge clk);
      end
    end
    $display("p_BE      bypass  bch1  bch2  bch3  bch4  flagged  avg_latency_cycles");
    for (int p = 0; p < NP; p++)
      $display("%0d.%07d  %5d %5d %5d %5d %5d  %7d  %10.1f", P_BE[p] / 10000000, P_BE[p] % 10000000,
               routes[p][0], routes[p][1], routes[p][2], routes[p][3], routes[p][4], routes[p][7],
               real'(lat_sum[p]) / real'(WORDS));
    check(lat_sum[0] < lat_sum[1], "p_BE 0.04 faster on average than 0.004 (words mostly flagged)");
    check(lat_sum[3] < lat_sum[2], "p_BE 0.00004 faster on average than 0.0004 (words mostly clean)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
