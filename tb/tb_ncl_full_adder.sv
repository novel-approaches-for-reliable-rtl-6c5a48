// tb_ncl_full_adder: self-checking test of the dual-rail NCL full adder.
//
// Starting from NULL, the three inputs become DATA one at a time in random order; the sum
// must not become DATA before the last input has arrived, and after it both outputs must
// carry the correct sum and carry. The inputs then return to NULL one at a time; the
// outputs must not be all NULL before the last input has left, and must be NULL after.
module tb_ncl_full_adder;

  logic       rst;
  logic [1:0] x, y, ci, s, co;

  ncl_full_adder dut (.rst, .x, .y, .ci, .s, .co);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [1:0] dr(bit v);
    return v ? 2'b10 : 2'b01;
  endfunction

  initial begin
    rst = 1; x = 0; y = 0; ci = 0;
    #1 rst = 0;
    #1;
    for (int it = 0; it < 400; it++) begin
      bit xv, yv, cv;
      int order [3];
      int sum;
      {xv, yv, cv} = 3'(it % 8);
      if (it >= 8) {xv, yv, cv} = 3'($urandom);
      order = '{0, 1, 2};
      order.shuffle();
      sum = int'(xv) + int'(yv) + int'(cv);
      for (int k = 0; k < 3; k++) begin
        case (order[k]) 0: x = dr(xv); 1: y = dr(yv); default: ci = dr(cv); endcase
        #1;
        check(s != 2'b11 && co != 2'b11, "no illegal rail pair");
        if (k < 2) check(s == 2'b00, $sformatf("sum DATA before all inputs (k=%0d)", k));
      end
      check(s == dr(sum[0]), $sformatf("sum %0d+%0d+%0d", xv, yv, cv));
      check(co == dr(sum[1]), $sformatf("carry %0d+%0d+%0d", xv, yv, cv));
      order.shuffle();
      for (int k = 0; k < 3; k++) begin
        case (order[k]) 0: x = 0; 1: y = 0; default: ci = 0; endcase
        #1;
        if (k < 2) check(s != 2'b00 || co != 2'b00, "outputs NULL before all inputs NULL");
      end
      check(s == 2'b00 && co == 2'b00, "outputs NULL after NULL wavefront");
    end
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
