// sc_roberts_cross: stochastic-computing Roberts-cross edge detector for one 2x2 window,
//   Z = 1/2 (|x00 - x11| + |x01 - x10|).
//
// With maximally correlated input streams (all generated from the same LD number) an XOR
// gate computes the absolute difference of two stream values; a multiplexer driven by a
// 0.5-valued select stream adds the two differences with weight 1/2. The design only
// names the Roberts-cross circuit; this XOR/MUX form is the standard stochastic one.
//
// Purely combinational, one bit per clock of the surrounding stream.
module sc_roberts_cross (
  input  logic x00,
  input  logic x01,
  input  logic x10,
  input  logic x11,
  input  logic sel,
  output logic z
);

  assign z = sel ? (x00 ^ x11) : (x01 ^ x10);

endmodule
