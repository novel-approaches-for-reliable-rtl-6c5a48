// bch_syndrome: bit-serial syndrome calculator for a t-error-correcting binary BCH code
// over GF(2^9).
//
// Each odd syndrome s_j = r(alpha^j) is accumulated by Horner's rule, one received bit per
// clock, highest-order bit r_{n-1} first:  s_j <= s_j * alpha^j + r_i.  After all n bits
// have been shifted in, the odd syndromes are complete. Even syndromes are not
// accumulated: for a binary code s_2j = (s_j)^2, so they are formed combinationally by
// squaring. This odd-only accumulation and the Horner chain are the structure the design
// describes; the field polynomial comes from gf9_pkg.
//
// Interface: `clear` zeroes the accumulators (takes priority over bit_valid); while
// `bit_valid` is high one bit is consumed per cycle. syn[j] (1-based, j = 1..2T) is valid
// the cycle after the last bit. Index 0 of syn is unused and reads 0.
module bch_syndrome
  import gf9_pkg::*;
#(
  parameter int unsigned T = 7
) (
  input  logic clk,
  input  logic clear,
  input  logic bit_valid,
  input  logic bit_in,
  output gf_t  syn [2*T+1]
);

  gf_t odd_q [T];   // odd_q[k] holds s_(2k+1)

  for (genvar k = 0; k < int'(T); k++) begin : g_odd
    localparam gf_t AJ = gf_alpha_pow(2*k + 1);   // alpha^(2k+1)
    always_ff @(posedge clk) begin
      if (clear)          odd_q[k] <= '0;
      else if (bit_valid) odd_q[k] <= gf_mul(odd_q[k], AJ) ^ gf_t'(bit_in);
    end
  end

  // s_j for j = 1..2T: odd ones from registers, even ones by repeated squaring of an odd one.
  assign syn[0] = '0;
  for (genvar j = 1; j <= int'(2*T); j++) begin : g_syn
    if (j % 2 == 1) begin : g_o
      assign syn[j] = odd_q[(j-1)/2];
    end else begin : g_e
      assign syn[j] = gf_sq(syn[j/2]);
    end
  end

endmodule
