// tb_ncl_di_register: self-checking test of the NCL delay-insensitive register.
//
// A random legal sequence (each bit NULL, DATA0 or DATA1; ki toggling) is applied and every
// rail is compared with a C-element reference (rises when rail and ki are both 1, falls
// when both are 0, else holds); ko must be the NOR of each bit's rails. The test counts
// DATA passed, NULL passed and wavefronts held back by the request.
module tb_ncl_di_register;

  localparam int W = 4;

  logic              rst, ki;
  logic [W-1:0][1:0] d, q, qm;
  logic [W-1:0]      ko;

  ncl_di_register #(.WIDTH(W)) dut (.rst, .ki, .d, .q, .ko);

  int checks = 0, failures = 0;
  int passed_data = 0, passed_null = 0, held = 0;

  initial begin
    rst = 1; ki = 1; d = '0; qm = '0;
    #1 rst = 0;
    #1;
    for (int step = 0; step < 5000; step++) begin
      if ($urandom_range(2) == 0) ki = ~ki;
      for (int i = 0; i < W; i++) begin
        case ($urandom_range(3))
          0: d[i] = 2'b00;
          1: d[i] = 2'b01;
          2: d[i] = 2'b10;
          default: ;
        endcase
        // keep a bit from switching directly between DATA0 and DATA1
        if (d[i] != 2'b00 && qm[i] != 2'b00 && d[i] != qm[i] && ki) d[i] = 2'b00;
      end
      #1;
      for (int i = 0; i < W; i++) begin
        for (int r = 0; r < 2; r++) begin
          if (d[i][r] && ki) begin
            if (!qm[i][r]) passed_data++;
            qm[i][r] = 1;
          end else if (!d[i][r] && !ki) begin
            if (qm[i][r]) passed_null++;
            qm[i][r] = 0;
          end else if (d[i][r] != qm[i][r]) held++;
        end
        checks++;
        if (q[i] !== qm[i]) begin failures++; $display("FAIL: bit %0d d=%b ki=%b q=%b expected %b", i, d[i], ki, q[i], qm[i]); end
        checks++;
        if (ko[i] !== ~(qm[i][0] | qm[i][1])) begin failures++; $display("FAIL: ko bit %0d", i); end
      end
    end
    if (passed_data == 0 || passed_null == 0 || held == 0) begin
      failures++; $display("FAIL: mechanism not exercised");
    end
    $display("passed_data=%0d passed_null=%0d held=%0d", passed_data, passed_null, held);
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
