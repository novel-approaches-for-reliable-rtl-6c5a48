// tb_bch_syndrome: streams received words (codeword plus 0..8 random errors) into the
// syndrome block, highest bit first, and compares all 14 syndromes with r(alpha^j)
// computed directly by the reference model. Error-free words must give all-zero syndromes.
module tb_bch_syndrome;
  import bch_tb_pkg::*;
  import gf9_pkg::gf_t;

  logic clk = 0;
  always #5 clk = ~clk;

  logic clear = 0, bit_valid = 0, bit_in = 0;
  gf_t  syn [15];

  bch_syndrome #(.T(7)) dut (.clk, .clear, .bit_valid, .bit_in, .syn);

  int checks = 0, failures = 0;

  task automatic run(logic [NN-1:0] r);
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int i = NN - 1; i >= 0; i--) begin
      bit_valid = 1; bit_in = r[i];
      @(negedge clk);
    end
    bit_valid = 0;
    @(negedge clk);
    for (int j = 1; j <= 14; j++) begin
      checks++;
      if (32'(syn[j]) != syndrome(r, j)) begin
        failures++;
        $display("FAIL: s%0d = %h expected %h", j, syn[j], syndrome(r, j));
      end
    end
  endtask

  initial begin
    init();
    for (int ne = 0; ne <= 8; ne++) run(add_errors(encode(rand_data()), ne));
    // an error-free word has zero syndromes (the reference agrees with the code)
    run(encode(rand_data()));
    checks++;
    if (syn[1] != '0 || syn[13] != '0) begin failures++; $display("FAIL: codeword syndrome"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
