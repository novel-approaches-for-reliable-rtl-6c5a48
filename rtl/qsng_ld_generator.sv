// qsng_ld_generator: low-discrepancy (Sobol) number generator of the QSNG.
//
// An NB-bit binary counter X advances by one each cycle with `inc`. For every dimension d,
// each counter bit X_(k+1) is ANDed with all bits of direction vector V_(k+1) and the
// gated vectors are XORed: ld[d] = XOR_k (X_(k+1) AND V_(k+1)). This is the AND/XOR
// structure of the design's EQSNG figure; X_1 being the least significant counter bit is
// this implementation's reading of it. With the dimension-0 vectors the sequence visits
// every NB-bit value once per 2^NB cycles.
//
// Timing: `ld` is combinational from the counter register; `clear` zeroes the counter
// (priority over inc).
module qsng_ld_generator #(
  parameter int unsigned NB   = 8,
  parameter int unsigned DIMS = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          inc,
  input  logic [NB-1:0] vec [DIMS][NB],
  output logic [NB-1:0] ld  [DIMS]
);

  logic [NB-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) cnt <= '0;
    else if (inc)        cnt <= cnt + 1'b1;
  end

  always_comb begin
    for (int d = 0; d < int'(DIMS); d++) begin
      ld[d] = '0;
      for (int k = 0; k < int'(NB); k++) ld[d] = ld[d] ^ (vec[d][k] & {NB{cnt[k]}});
    end
  end

endmodule
