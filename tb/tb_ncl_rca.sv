// tb_ncl_rca: self-checking test of the 4-bit dual-rail NCL ripple-carry adder.
//
// All 512 (a, b, ci) combinations, then random ones. Inputs arrive one dual-rail bit at a
// time in random order: the outputs must not be all DATA before the last arrival and must
// then equal a + b + ci. Inputs leave in random order: the outputs must not be all NULL
// before the last input is NULL, and must be NULL afterwards.
module tb_ncl_rca;

  localparam int W = 4;

  logic              rst;
  logic [W-1:0][1:0] a, b, s;
  logic [1:0]        ci, co;

  ncl_rca #(.WIDTH(W)) dut (.rst, .a, .b, .ci, .s, .co);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [1:0] dr(bit v);
    return v ? 2'b10 : 2'b01;
  endfunction

  function automatic bit all_data();
    bit r;
    r = (co == 2'b01 || co == 2'b10);
    for (int i = 0; i < W; i++) r &= (s[i] == 2'b01 || s[i] == 2'b10);
    return r;
  endfunction

  function automatic bit all_null();
    bit r;
    r = (co == 2'b00);
    for (int i = 0; i < W; i++) r &= (s[i] == 2'b00);
    return r;
  endfunction

  task automatic set_in(int idx, bit null_it, logic [W-1:0] av, logic [W-1:0] bv, bit cv);
    if (idx < W)          a[idx]   = null_it ? 2'b00 : dr(av[idx]);
    else if (idx < 2 * W) b[idx-W] = null_it ? 2'b00 : dr(bv[idx-W]);
    else                  ci       = null_it ? 2'b00 : dr(cv);
  endtask

  initial begin
    rst = 1; a = '0; b = '0; ci = '0;
    #1 rst = 0;
    #1;
    for (int it = 0; it < 1024; it++) begin
      logic [W-1:0] av, bv;
      bit cv;
      int order [2*W+1];
      logic [W:0] sum;
      {cv, av, bv} = 9'(it);
      if (it >= 512) {cv, av, bv} = 9'($urandom);
      sum = av + bv + cv;
      foreach (order[k]) order[k] = k;
      order.shuffle();
      foreach (order[k]) begin
        set_in(order[k], 0, av, bv, cv);
        #1;
        if (k < 2*W) check(!all_data(), "outputs complete before all inputs DATA");
      end
      check(all_data(), "outputs complete");
      for (int i = 0; i < W; i++) check(s[i] == dr(sum[i]), $sformatf("%0d+%0d+%0d sum bit %0d", av, bv, cv, i));
      check(co == dr(sum[W]), $sformatf("%0d+%0d+%0d carry", av, bv, cv));
      order.shuffle();
      foreach (order[k]) begin
        set_in(order[k], 1, av, bv, cv);
        #1;
        if (k < 2*W) check(!all_null(), "outputs NULL before all inputs NULL");
      end
      check(all_null(), "outputs NULL after NULL wavefront");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
