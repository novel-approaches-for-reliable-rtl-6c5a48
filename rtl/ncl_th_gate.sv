// ncl_th_gate: NULL Convention Logic threshold gate THmn with optional input weights
// (THmnWw0w1w2), the basic cell of every NCL circuit in this design.
//
// Function: Z = set + Z' * hold, where set = (sum of weight_i * a_i >= M) and hold = OR of
// all inputs. Once asserted the output stays high until every input has returned to 0
// (hysteresis), which keeps successive DATA wavefronts separated by a NULL wavefront.
// Examples: TH22 = (N=2, M=2); TH23 = (3, 2); TH34w2 = (4, 3, W0=2); TH12 = (2, 1).
// The gate is modelled at logic level as a level-sensitive latch: it is enabled whenever
// the output must change (set, or no input asserted) and otherwise holds. The design's
// static-CMOS, GDI and hybrid transistor circuits all realise this same function. The
// `rst` input (forcing 0, i.e. the NULL state) is this implementation's addition so that
// simulation and hardware start from NULL.
//
// Interface: a[N-1:0] inputs, input 0..2 carry weights W0..W2 (others weight 1); z output.
// Asynchronous: no clock.
module ncl_th_gate #(
  parameter int unsigned N  = 3,
  parameter int unsigned M  = 2,
  parameter int unsigned W0 = 1,
  parameter int unsigned W1 = 1,
  parameter int unsigned W2 = 1
) (
  input  logic         rst,
  input  logic [N-1:0] a,
  output logic         z
);

  // set and hold are evaluated inside the latch process itself so that the gate reacts
  // directly to its inputs
  always_latch begin
    int unsigned sum;
    sum = 0;
    for (int i = 0; i < int'(N); i++) begin
      if (a[i]) sum += (i == 0) ? W0 : (i == 1) ? W1 : (i == 2) ? W2 : 1;
    end
    if (rst || sum >= M || a == '0) z = !rst && (sum >= M);
  end

endmodule
