// tb_sc_roberts_cross: self-checking test of the stochastic Roberts-cross circuit.
//
// Exhaustive truth table (32 input combinations), then a stream test: pixels encoded as
// maximally correlated 256-bit streams (bit = u < p with u the bit-reversed counter) and
// a 0.5 select stream from an independent sequence; the ones count must be within a few
// units of (|p00 - p11| + |p01 - p10|) / 2.
module tb_sc_roberts_cross;

  logic x00, x01, x10, x11, sel, z;

  sc_roberts_cross dut (.x00, .x01, .x10, .x11, .sel, .z);

  int checks = 0, failures = 0;

  initial begin
    for (int v = 0; v < 32; v++) begin
      {sel, x00, x01, x10, x11} = 5'(v);
      #1;
      checks++;
      if (z !== (sel ? (x00 ^ x11) : (x01 ^ x10))) begin failures++; $display("FAIL: truth table %b", v); end
    end
    for (int it = 0; it < 200; it++) begin
      int p00, p01, p10, p11, ones, expect2, d;
      p00 = $urandom_range(255); p01 = $urandom_range(255); p10 = $urandom_range(255); p11 = $urandom_range(255);
      ones = 0;
      for (int c = 0; c < 256; c++) begin
        int u, s;
        u = 0;
        for (int k = 0; k < 8; k++) if ((c & (1 << k)) != 0) u |= 128 >> k;
        s = (c * 37 + 11) % 256;          // 0.5 select: a decorrelated permutation
        x00 = (u < p00); x01 = (u < p01); x10 = (u < p10); x11 = (u < p11);
        sel = (s < 128);
        #1;
        ones += int'(z);
      end
      expect2 = ((p00 > p11 ? p00 - p11 : p11 - p00) + (p01 > p10 ? p01 - p10 : p10 - p01));
      d = 2 * ones - expect2;
      checks++;
      if (d > 40 || d < -40) begin
        failures++;
        $display("FAIL: stream %0d %0d %0d %0d ones=%0d expected about %0d", p00, p01, p10, p11, ones, expect2 / 2);
      end
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
