// tb_ncl_completion: self-checking test of NCL completion detection for widths 1, 4, 5, 9
// and 16. The ko inputs rise one by one in random order from all-0 (output must stay 0
// until the last rises, then become 1) and fall one by one (output must stay 1 until the
// last falls, then become 0), the way a register's ko bits change in an NCL pipeline.
module tb_ncl_completion;

  logic rst;
  logic [0:0]  k1;  logic z1;
  logic [3:0]  k4;  logic z4;
  logic [4:0]  k5;  logic z5;
  logic [8:0]  k9;  logic z9;
  logic [15:0] k16; logic z16;

  ncl_completion #(.WIDTH(1))  u1  (.rst, .ko(k1),  .kout(z1));
  ncl_completion #(.WIDTH(4))  u4  (.rst, .ko(k4),  .kout(z4));
  ncl_completion #(.WIDTH(5))  u5  (.rst, .ko(k5),  .kout(z5));
  ncl_completion #(.WIDTH(9))  u9  (.rst, .ko(k9),  .kout(z9));
  ncl_completion #(.WIDTH(16)) u16 (.rst, .ko(k16), .kout(z16));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic setbit(int w, int i, bit v);
    case (w)
      1: k1[i] = v;
      4: k4[i] = v;
      5: k5[i] = v;
      9: k9[i] = v;
      default: k16[i] = v;
    endcase
  endtask

  function automatic bit outp(int w);
    case (w)
      1: return z1;
      4: return z4;
      5: return z5;
      9: return z9;
      default: return z16;
    endcase
  endfunction

  initial begin
    static int widths [5] = '{1, 4, 5, 9, 16};
    rst = 1; k1 = 0; k4 = 0; k5 = 0; k9 = 0; k16 = 0;
    #1 rst = 0;
    #1;
    for (int it = 0; it < 100; it++) begin
      foreach (widths[wi]) begin
        int w;
        int order [$];
        w = widths[wi];
        order = {};
        for (int i = 0; i < w; i++) order.push_back(i);
        order.shuffle();
        foreach (order[k]) begin
          setbit(w, order[k], 1);
          #1;
          if (k < w - 1) check(outp(w) == 0, $sformatf("W=%0d rose early", w));
        end
        check(outp(w) == 1, $sformatf("W=%0d rises when all ko high", w));
        order.shuffle();
        foreach (order[k]) begin
          setbit(w, order[k], 0);
          #1;
          if (k < w - 1) check(outp(w) == 1, $sformatf("W=%0d fell early", w));
        end
        check(outp(w) == 0, $sformatf("W=%0d falls when all ko low", w));
      end
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
