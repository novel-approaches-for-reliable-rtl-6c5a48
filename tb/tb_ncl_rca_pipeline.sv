// tb_ncl_rca_pipeline: self-checking test of the NCL pipeline around the 4-bit
// ripple-carry adder.
//
// A sender process follows the handshake: when ko = 1 it presents a DATA operand set (bits
// arriving in random order with random gaps), when ko = 0 it presents NULL. A receiver
// process waits for a complete DATA result, checks it against the operands in order,
// lowers ki, waits for a complete NULL, and raises ki, with random delays. The test counts
// DATA and NULL wavefronts and the times two operand sets were in flight at once (the
// receiver slower than the sender), and fails if any of these never happened.
module tb_ncl_rca_pipeline;

  localparam int W = 4;

  logic              rst, ko, ki;
  logic [W-1:0][1:0] a, b, s;
  logic [1:0]        ci, co;

  ncl_rca_pipeline dut (.rst, .a, .b, .ci, .ko, .ki, .s, .co);

  int checks = 0, failures = 0;
  int sent = 0, received = 0, null_waves = 0, overlap = 0;
  logic [W:0] expq [$];
  localparam int NTOK = 600;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [1:0] dr(bit v);
    return v ? 2'b10 : 2'b01;
  endfunction

  function automatic bit out_data();
    bit r;
    r = (co == 2'b01 || co == 2'b10);
    for (int i = 0; i < W; i++) r &= (s[i] == 2'b01 || s[i] == 2'b10);
    return r;
  endfunction

  function automatic bit out_null();
    bit r;
    r = (co == 2'b00);
    for (int i = 0; i < W; i++) r &= (s[i] == 2'b00);
    return r;
  endfunction

  function automatic logic [W:0] out_val();
    logic [W:0] v;
    for (int i = 0; i < W; i++) v[i] = s[i][1];
    v[W] = co[1];
    return v;
  endfunction

  logic odata, onull;
  assign odata = out_data();
  assign onull = out_null();

  // sender
  initial begin
    rst = 1; a = '0; b = '0; ci = '0;
    #5 rst = 0;
    for (int t = 0; t < NTOK; t++) begin
      logic [W-1:0] av, bv;
      bit cv;
      int order [2*W+1];
      wait (ko == 1'b1);
      #($urandom_range(3) + 1);
      {cv, av, bv} = 9'($urandom);
      expq.push_back((W+1)'(av) + (W+1)'(bv) + (W+1)'(cv));
      sent++;
      if (odata) overlap++;   // previous result still held at the output
      foreach (order[k]) order[k] = k;
      order.shuffle();
      foreach (order[k]) begin
        if (order[k] < W)        a[order[k]]   = dr(av[order[k]]);
        else if (order[k] < 2*W) b[order[k]-W] = dr(bv[order[k]-W]);
        else                     ci            = dr(cv);
        if ($urandom_range(1)) #1;
      end
      wait (ko == 1'b0);
      #($urandom_range(3) + 1);
      a = '0; b = '0; ci = '0;
    end
  end

  // receiver
  initial begin
    ki = 1;
    #5;
    for (int t = 0; t < NTOK; t++) begin
      wait (odata);
      #1;
      check(out_data(), "output DATA stable");
      check(expq.size() > 0, "result without operands");
      if (expq.size() > 0) begin
        logic [W:0] e;
        e = expq.pop_front();
        check(out_val() == e, $sformatf("token %0d result %0d expected %0d", t, out_val(), e));
      end
      received++;
      // slow receiver for a stretch so that the sender runs ahead
      if ((t / 50) % 2 == 1) #($urandom_range(30, 10)); else #($urandom_range(3) + 1);
      ki = 0;
      wait (onull);
      null_waves++;
      #($urandom_range(3) + 1);
      ki = 1;
    end
    check(received == NTOK, "all tokens received");
    check(overlap > 0, "two operand sets in flight at once");
    if (received == 0 || null_waves == 0 || overlap == 0) begin
      failures++; $display("FAIL: mechanism never exercised");
    end
    $display("data_waves=%0d null_waves=%0d overlap=%0d", received, null_waves, overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
