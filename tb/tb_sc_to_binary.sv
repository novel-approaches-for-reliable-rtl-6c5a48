// tb_sc_to_binary: self-checking test of the stochastic-to-binary counter against a model
// for random streams, enables and clears, including a full 256-ones stream.
module tb_sc_to_binary;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       clear, en, bit_in;
  logic [8:0] count;
  int         model;

  sc_to_binary dut (.clk, .rst_n, .clear, .en, .bit_in, .count);

  int checks = 0, failures = 0;

  initial begin
    clear = 0; en = 0; bit_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    model = 0;
    en = 1; bit_in = 1;
    repeat (256) @(negedge clk);
    checks++;
    if (count !== 9'd256) begin failures++; $display("FAIL: full stream count %0d", count); end
    clear = 1; @(negedge clk); clear = 0; model = 0;
    for (int i = 0; i < 3000; i++) begin
      clear = ($urandom_range(200) == 0);
      en = ($urandom_range(3) != 0);
      bit_in = 1'($urandom);
      @(negedge clk);
      if (clear) model = 0; else if (en && bit_in) model = (model + 1) % 512;
      checks++;
      if (count !== 9'(model)) begin failures++; $display("FAIL: count %0d expected %0d", count, model); end
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
