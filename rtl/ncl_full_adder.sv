// ncl_full_adder: dual-rail NULL Convention Logic full adder.
//
// Each signal is a rail pair {rail1, rail0}: 01 = DATA0, 10 = DATA1, 00 = NULL
// (11 is illegal). The carry rails come from two TH23 gates (majority of the three
// like-polarity input rails). Each sum rail is a TH34w2 gate whose weight-2 input is the
// carry rail of opposite polarity and whose other inputs are the three input rails of the
// sum's polarity: sum0 when carry=1 and one input is 0, or all inputs are 0; sum1
// likewise. This is the gate structure of the design's full-adder figure.
// The circuit is input-complete: outputs become DATA only when all inputs are DATA and
// return to NULL only when all inputs are NULL.
//
// Asynchronous, no clock; rst forces every gate to NULL.
module ncl_full_adder (
  input  logic       rst,
  input  logic [1:0] x,
  input  logic [1:0] y,
  input  logic [1:0] ci,
  output logic [1:0] s,
  output logic [1:0] co
);

  // carry: TH23 per rail
  ncl_th_gate #(.N(3), .M(2)) u_c0 (.rst, .a({ci[0], x[0], y[0]}), .z(co[0]));
  ncl_th_gate #(.N(3), .M(2)) u_c1 (.rst, .a({ci[1], x[1], y[1]}), .z(co[1]));

  // sum: TH34w2 per rail, weighted input (a[0]) is the opposite carry rail
  ncl_th_gate #(.N(4), .M(3), .W0(2)) u_s0 (.rst, .a({ci[0], y[0], x[0], co[1]}), .z(s[0]));
  ncl_th_gate #(.N(4), .M(3), .W0(2)) u_s1 (.rst, .a({ci[1], y[1], x[1], co[0]}), .z(s[1]));

endmodule
