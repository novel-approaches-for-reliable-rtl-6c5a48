// bch_chien: serial Chien search with Horner evaluation.
//
// A register x starts at 000000001 (alpha^0) and is multiplied by alpha every cycle.
// In the same cycle Lambda(x) is evaluated by Horner's rule,
//   (((Lambda_T x + Lambda_(T-1)) x + ...) x + Lambda_0),
// which is the multiplier/adder chain of the design's Chien-search diagram. If the value
// is zero, x = alpha^c is a root, so the error lies at bit position (n - c) mod n.
// The n candidates alpha^0 .. alpha^(n-1) take n cycles.
//
// Interface: `start` latches lambda. For the next N cycles root_valid is high and
// `root`/`pos` describe candidate c = 0..N-1; `done` pulses in the cycle after the last
// candidate.
module bch_chien
  import gf9_pkg::*;
#(
  parameter int unsigned T = 7
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  gf_t        lambda [T+1],
  output logic       root_valid,
  output logic       root,
  output logic [8:0] pos,
  output logic       done
);

  gf_t        lam_q [T+1];
  gf_t        x_q;
  logic [8:0] c_q;
  logic       busy_q;

  gf_t eval;
  always_comb begin
    eval = lam_q[T];
    for (int i = int'(T) - 1; i >= 0; i--) eval = gf_mul(eval, x_q) ^ lam_q[i];
  end

  assign root_valid = busy_q;
  assign root       = busy_q && (eval == '0);
  assign pos        = (c_q == 9'd0) ? 9'd0 : 9'(N - int'(c_q));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      done   <= 1'b0;
      c_q    <= '0;
      x_q    <= gf_t'(1);
      for (int i = 0; i <= int'(T); i++) lam_q[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        lam_q  <= lambda;
        x_q    <= gf_t'(1);
        c_q    <= '0;
        busy_q <= 1'b1;
      end else if (busy_q) begin
        x_q <= gf_mul(x_q, gf_t'(2));
        c_q <= c_q + 1'b1;
        if (c_q == 9'(N - 1)) begin
          busy_q <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end

endmodule
