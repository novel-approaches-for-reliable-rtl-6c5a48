// bch_elp_peterson: direct (Peterson) solution of the key equation for the two fast
// decoding paths, t = 1 and t = 3.
//
// For t = 1 the error-locator polynomial is Lambda(x) = 1 + s1 x.
// For t = 3 it is Lambda(x) = 1 + L1 x + L2 x^2 + L3 x^3 with
//   L1 = s1,  L2 = (s1^2 s3 + s5) / (s1^3 + s3),  L3 = (s1^3 + s3) + s1 L2,
// the closed form of the 3x3 Peterson system. When s1^3 + s3 = 0 the word holds at most
// one error; L2 and L3 are then forced to 0 (this guard and the inverse-based division are
// this implementation's choices). Division uses the combinational inverse a^(2^9-2).
//
// Timing: the result is registered; `done` pulses one cycle after `start`, with `lambda`
// held until the next start. Only T = 1 and T = 3 are meaningful.
module bch_elp_peterson
  import gf9_pkg::*;
#(
  parameter int unsigned T = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  gf_t  syn    [2*T+1],
  output logic done,
  output gf_t  lambda [T+1]
);

  gf_t lam_c [T+1];

  if (T >= 3) begin : g_t3
    always_comb begin
      gf_t s1_3, den, num, l2;
      for (int i = 0; i <= int'(T); i++) lam_c[i] = '0;
      lam_c[0] = gf_t'(1);
      lam_c[1] = syn[1];
      s1_3 = gf_mul(gf_sq(syn[1]), syn[1]);
      den  = s1_3 ^ syn[3];
      num  = gf_mul(gf_sq(syn[1]), syn[3]) ^ syn[5];
      l2   = gf_mul(num, gf_inv(den));
      if (den != '0) begin
        lam_c[2] = l2;
        lam_c[3] = den ^ gf_mul(syn[1], l2);
      end
    end
  end else begin : g_t1
    always_comb begin
      lam_c[0] = gf_t'(1);
      lam_c[1] = syn[1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int i = 0; i <= int'(T); i++) lambda[i] <= '0;
    end else begin
      done <= start;
      if (start) lambda <= lam_c;
    end
  end

endmodule
