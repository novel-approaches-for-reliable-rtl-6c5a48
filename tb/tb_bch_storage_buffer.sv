// tb_bch_storage_buffer: random push/pop traffic against a queue model, checking order,
// the head value, the occupancy count and the empty/full flags every cycle, with the
// buffer driven to full and to empty several times.
module tb_bch_storage_buffer;
  localparam int D = 4;
  localparam int W = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         push = 0, pop = 0, empty, full;
  logic [W-1:0] din = '0, dout;
  logic [2:0]   count;

  bch_storage_buffer #(.DEPTH(D), .W(W)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .empty, .full, .count);

  int checks = 0, failures = 0, fulls = 0, empties = 0;
  logic [W-1:0] q [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      bit phase_fill;
      @(negedge clk);
      check(int'(count) == q.size(), "count");
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == D), "full flag");
      if (q.size() > 0) check(dout == q[0], "head value");
      if (full) fulls++;
      if (empty) empties++;
      phase_fill = ((cyc / 50) % 2) == 0;
      push = !full && ($urandom_range(99) < (phase_fill ? 80 : 20));
      pop  = !empty && ($urandom_range(99) < (phase_fill ? 20 : 80));
      din  = {$urandom, 8'($urandom)};
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
      push = 0; pop = 0;
    end
    check(fulls > 0 && empties > 0, "buffer reached full and empty");
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
