// bch_elp_sibm: simplified inversionless Berlekamp-Massey (SiBM) key-equation solver for
// the stronger decoding paths (t = 5 and t = 7) of a binary BCH code.
//
// For binary codes every odd-step discrepancy is zero, so only t iterations are run,
// one per clock cycle. Iteration r (r = 0..t-1):
//   delta      = sum_i Lambda_i * s_(2r+1-i)
//   Lambda(x) <= gamma * Lambda(x) + delta * x * B(x)
//   if (delta != 0 && k >= 0):  B(x) <= x * Lambda(x), gamma <= delta, k <= -k
//   else:                       B(x) <= x^2 * B(x),                   k <= k + 2
// starting from Lambda = B = 1, gamma = 1, k = 0. No field inversion is needed; the result
// is a nonzero multiple of the true locator and has the same roots. The design names SiBM
// and describes a two-layer processing-element array; this module computes the same
// recursion serially with one parallel discrepancy inner product per cycle.
//
// Timing: `start` loads the syndromes; `done` pulses after T iteration cycles, and
// `lambda` holds the result until the next start.
module bch_elp_sibm
  import gf9_pkg::*;
#(
  parameter int unsigned T = 7
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  gf_t  syn    [2*T+1],
  output logic done,
  output gf_t  lambda [T+1]
);

  localparam int unsigned CW = $clog2(T + 1);

  gf_t              s_q   [2*T+1];
  gf_t              lam_q [T+1];
  gf_t              b_q   [T+1];
  gf_t              gamma_q;
  logic signed [7:0] k_q;
  logic [CW-1:0]    r_q;
  logic             busy_q;

  // Discrepancy of iteration r_q and next-state values
  gf_t delta;
  gf_t lam_n [T+1];
  gf_t b_n   [T+1];

  always_comb begin
    int idx;
    delta = '0;
    for (int i = 0; i <= int'(T); i++) begin
      idx = 2 * int'(r_q) + 1 - i;
      if (idx >= 1) delta = delta ^ gf_mul(lam_q[i], s_q[idx]);
    end
    for (int i = 0; i <= int'(T); i++) begin
      lam_n[i] = gf_mul(gamma_q, lam_q[i]) ^ ((i >= 1) ? gf_mul(delta, b_q[i-1]) : gf_t'(0));
      if (delta != '0 && k_q >= 0) b_n[i] = (i >= 1) ? lam_q[i-1] : gf_t'(0);
      else                         b_n[i] = (i >= 2) ? b_q[i-2]   : gf_t'(0);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      done    <= 1'b0;
      r_q     <= '0;
      k_q     <= '0;
      gamma_q <= gf_t'(1);
      for (int i = 0; i <= int'(T); i++) begin
        lam_q[i] <= '0;
        b_q[i]   <= '0;
      end
      for (int j = 0; j <= int'(2*T); j++) s_q[j] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        s_q     <= syn;
        busy_q  <= 1'b1;
        r_q     <= '0;
        k_q     <= '0;
        gamma_q <= gf_t'(1);
        for (int i = 0; i <= int'(T); i++) begin
          lam_q[i] <= (i == 0) ? gf_t'(1) : gf_t'(0);
          b_q[i]   <= (i == 0) ? gf_t'(1) : gf_t'(0);
        end
      end else if (busy_q) begin
        lam_q <= lam_n;
        b_q   <= b_n;
        if (delta != '0 && k_q >= 0) begin
          gamma_q <= delta;
          k_q     <= -k_q;
        end else begin
          k_q     <= k_q + 8'sd2;
        end
        if (r_q == CW'(T - 1)) begin
          busy_q <= 1'b0;
          done   <= 1'b1;
        end
        r_q <= r_q + 1'b1;
      end
    end
  end

  assign lambda = lam_q;

endmodule
