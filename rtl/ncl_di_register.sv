// ncl_di_register: delay-insensitive (DI) register stage of an NCL pipeline.
//
// Every rail passes through a TH22 gate whose second input is the request ki from the
// next stage's completion detection: with ki = 1 (request for DATA) a DATA wavefront is
// passed and then held; with ki = 0 (request for NULL) a NULL wavefront is passed and
// held. Each bit reports ko = NOR of its two output rails (1 = holding NULL, ready for
// DATA); a completion-detection block combines these into the request for the previous
// stage. This structure (TH22 per rail, reset to NULL) is the conventional one and is this
// implementation's choice; the design gives the register's role and handshake.
//
// Asynchronous, no clock; rst forces the outputs to NULL.
module ncl_di_register #(
  parameter int unsigned WIDTH = 4
) (
  input  logic                  rst,
  input  logic                  ki,
  input  logic [WIDTH-1:0][1:0] d,
  output logic [WIDTH-1:0][1:0] q,
  output logic [WIDTH-1:0]      ko
);

  for (genvar i = 0; i < int'(WIDTH); i++) begin : g_bit
    ncl_th_gate #(.N(2), .M(2)) u_r0 (.rst, .a({ki, d[i][0]}), .z(q[i][0]));
    ncl_th_gate #(.N(2), .M(2)) u_r1 (.rst, .a({ki, d[i][1]}), .z(q[i][1]));
    assign ko[i] = ~(q[i][0] | q[i][1]);
  end

endmodule
