// tb_ncl_th24comp: self-checking test of the TH24comp gate against the rule
// set = (A + B)(C + D), hold = A + B + C + D, over a random input sequence with resets.
module tb_ncl_th24comp;

  logic       rst;
  logic [3:0] a;
  logic       z, zm;

  ncl_th24comp dut (.rst, .a, .z);

  int checks = 0, failures = 0, rises = 0, holds = 0;

  initial begin
    rst = 1; a = '0; zm = 0;
    #1;
    for (int step = 0; step < 3000; step++) begin
      a = 4'($urandom);
      if ($urandom_range(3) == 0) a = '0;
      rst = (step % 700 == 350);
      #1;
      if (rst) zm = 0;
      else if ((a[0] | a[1]) & (a[2] | a[3])) begin if (!zm) rises++; zm = 1; end
      else if (a == 0) zm = 0;
      else if (zm) holds++;
      checks++;
      if (z !== zm) begin failures++; $display("FAIL: a=%b z=%b expected %b", a, z, zm); end
    end
    if (rises == 0 || holds == 0) begin failures++; $display("FAIL: no set or no hysteresis exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
