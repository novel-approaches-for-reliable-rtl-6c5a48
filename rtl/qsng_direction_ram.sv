// qsng_direction_ram: RAM of pre-computed direction vectors for the quasi-stochastic
// number generator (in an FPGA these are distributed LUT memories).
//
// Holds DIMS dimensions x NB vectors x NB bits. All vectors are read in parallel through
// `vec[d][k]` (vector V_(k+1) of dimension d). One vector can be rewritten per clock through
// we/wdim/widx/wdata. Reset loads the first two Sobol dimensions, which the design does not
// print (this implementation's choice):
//   dimension 0: v_k = 2^(NB-k)                    (van der Corput, 128, 64, ..., 1)
//   dimension 1: v_k = m_k 2^(NB-k), m_k = 1, 3, 5, 15, 17, 51, 85, 255, ...
//                (m_k = m_(k-1) XOR 2 m_(k-1), primitive polynomial x + 1)
// Dimension 0 drives the pixel comparators; dimension 1 drives the 0.5 select stream of
// the edge detector. NB = 8 is the design's (256-bit streams).
module qsng_direction_ram #(
  parameter int unsigned NB   = 8,
  parameter int unsigned DIMS = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    we,
  input  logic [$clog2(DIMS)-1:0] wdim,
  input  logic [$clog2(NB)-1:0]   widx,
  input  logic [NB-1:0]           wdata,
  output logic [NB-1:0]           vec [DIMS][NB]
);

  function automatic logic [NB-1:0] init_vec(int d, int k);   // k = 0 .. NB-1 (V_(k+1))
    logic [NB-1:0] m;
    m = 1;
    if (d == 0) return NB'(1) << (NB - 1 - k);
    for (int i = 0; i < k; i++) m = m ^ (m << 1);
    return m << (NB - 1 - k);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int d = 0; d < int'(DIMS); d++)
        for (int k = 0; k < int'(NB); k++) vec[d][k] <= init_vec(d, k);
    end else if (we) begin
      vec[wdim][widx] <= wdata;
    end
  end

endmodule
