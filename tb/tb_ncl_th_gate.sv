// tb_ncl_th_gate: self-checking test of the threshold-gate model.
//
// Several parameterisations (TH12, TH22, TH23, TH34w2, TH44, TH54w322) receive the same
// random input sequence; after each change every output is compared with the reference
// rule z' = set ? 1 : (any input high ? z : 0), including the reset-to-NULL input.
module tb_ncl_th_gate;

  localparam int NG = 6;
  int cfg_n [NG] = '{2, 2, 3, 4, 4, 5};
  int cfg_m [NG] = '{1, 2, 2, 3, 4, 5};
  int cfg_w [NG][3] = '{'{1,1,1}, '{1,1,1}, '{1,1,1}, '{2,1,1}, '{1,1,1}, '{3,2,2}};

  logic       rst;
  logic [4:0] a;
  logic [NG-1:0] z;

  ncl_th_gate #(.N(2), .M(1))                       u_th12   (.rst, .a(a[1:0]), .z(z[0]));
  ncl_th_gate #(.N(2), .M(2))                       u_th22   (.rst, .a(a[1:0]), .z(z[1]));
  ncl_th_gate #(.N(3), .M(2))                       u_th23   (.rst, .a(a[2:0]), .z(z[2]));
  ncl_th_gate #(.N(4), .M(3), .W0(2))               u_th34w2 (.rst, .a(a[3:0]), .z(z[3]));
  ncl_th_gate #(.N(4), .M(4))                       u_th44   (.rst, .a(a[3:0]), .z(z[4]));
  ncl_th_gate #(.N(5), .M(5), .W0(3), .W1(2), .W2(2)) u_th54w322 (.rst, .a(a), .z(z[5]));

  int checks = 0, failures = 0;
  int rises = 0, holds = 0;
  logic [NG-1:0] zm;

  initial begin
    rst = 1; a = '0;
    #1;
    for (int g = 0; g < NG; g++) begin
      checks++;
      if (z[g] !== 1'b0) begin failures++; $display("FAIL: gate %0d not NULL in reset", g); end
    end
    rst = 0; zm = '0;
    #1;
    for (int step = 0; step < 4000; step++) begin
      a = 5'($urandom);
      if ($urandom_range(3) == 0) a = '0;
      if (step % 500 == 250) rst = 1; else rst = 0;
      #1;
      for (int g = 0; g < NG; g++) begin
        int sum; bit hold;
        sum = 0; hold = 0;
        for (int i = 0; i < cfg_n[g]; i++) if (a[i]) begin
          sum += (i < 3) ? cfg_w[g][i] : 1;
          hold = 1;
        end
        if (rst) zm[g] = 0;
        else if (sum >= cfg_m[g]) begin
          if (!zm[g]) rises++;
          zm[g] = 1;
        end else if (!hold) zm[g] = 0;
        else if (zm[g]) holds++;
        checks++;
        if (z[g] !== zm[g]) begin
          failures++;
          $display("FAIL: gate %0d a=%b z=%b expected %b", g, a, z[g], zm[g]);
        end
      end
    end
    if (rises == 0 || holds == 0) begin failures++; $display("FAIL: no set or no hysteresis exercised"); end
    $display("rises=%0d hysteresis_holds=%0d", rises, holds);
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
