// tb_neeb_estimator: checks the reset threshold table over the whole temperature range
// against a directly computed count, then rewrites the table and checks again.
module tb_neeb_estimator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       cfg_we = 0;
  logic [2:0] cfg_idx = 0;
  logic [7:0] cfg_thr = 0, temp = 0;
  logic [3:0] neeb;

  neeb_estimator #(.TEMP_W(8)) dut (.clk, .rst_n, .cfg_we, .cfg_idx, .cfg_thr, .temp, .neeb);

  int checks = 0, failures = 0;
  int thr [8] = '{50, 60, 70, 80, 85, 90, 95, 100};

  function automatic int model(int t);
    int n;
    n = 0;
    foreach (thr[i]) if (t >= thr[i]) n++;
    return n;
  endfunction

  task automatic sweep();
    for (int t = 0; t < 256; t++) begin
      temp = 8'(t);
      #1;
      checks++;
      if (int'(neeb) != model(t)) begin
        failures++;
        $display("FAIL: temp %0d neeb %0d expected %0d", t, neeb, model(t));
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    sweep();
    for (int i = 0; i < 8; i++) begin
      thr[i] = 20 + 25 * i;
      @(negedge clk);
      cfg_we = 1; cfg_idx = 3'(i); cfg_thr = 8'(thr[i]);
    end
    @(negedge clk);
    cfg_we = 0;
    sweep();
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
