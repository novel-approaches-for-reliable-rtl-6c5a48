// tb_bch_path_dispatcher: exhaustive check of path selection over every idle pattern and
// every n_EEB of the buffer head and of the incoming word, against the rule "idle path with
// the smallest t >= n_EEB (t = 1, 3, 5, 7), head served first".
module tb_bch_path_dispatcher;
  logic [3:0] path_idle, head_grant, new_grant;
  logic       head_valid, new_valid;
  logic [3:0] head_neeb, new_neeb;

  bch_path_dispatcher #(.NP(4)) dut (.path_idle, .head_valid, .head_neeb, .new_valid, .new_neeb, .head_grant, .new_grant);

  int checks = 0, failures = 0;
  int tt [4] = '{1, 3, 5, 7};

  function automatic logic [3:0] ref_pick(logic [3:0] idle, int n);
    for (int p = 0; p < 4; p++) if (idle[p] && tt[p] >= n) return 4'(1 << p);
    return 4'b0;
  endfunction

  initial begin
    for (int idle = 0; idle < 16; idle++)
      for (int hv = 0; hv < 2; hv++)
        for (int nv = 0; nv < 2; nv++)
          for (int hn = 1; hn <= 8; hn++)
            for (int nn = 1; nn <= 8; nn++) begin
              logic [3:0] eh, en;
              path_idle = 4'(idle); head_valid = hv[0]; new_valid = nv[0];
              head_neeb = 4'(hn); new_neeb = 4'(nn);
              #1;
              eh = (hv != 0) ? ref_pick(4'(idle), hn) : 4'b0;
              en = (nv != 0) ? ref_pick(4'(idle) & ~eh, nn) : 4'b0;
              checks++;
              if (head_grant !== eh || new_grant !== en) begin
                failures++;
                if (failures < 10) $display("FAIL: idle=%b hn=%0d nn=%0d got %b/%b exp %b/%b", idle, hn, nn, head_grant, new_grant, eh, en);
              end
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
