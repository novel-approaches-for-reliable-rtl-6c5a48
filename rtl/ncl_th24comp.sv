// ncl_th24comp: NCL TH24comp gate, set = (A + B)(C + D) = AC + BC + AD + BD,
// hold = A + B + C + D, Z = set + Z' * hold.
//
// Same latch model and reset-to-NULL input as ncl_th_gate; a[0..3] = A, B, C, D.
// Asynchronous: no clock.
module ncl_th24comp (
  input  logic       rst,
  input  logic [3:0] a,
  output logic       z
);

  always_latch begin
    if (rst || ((a[0] | a[1]) & (a[2] | a[3])) || a == '0) z = !rst && ((a[0] | a[1]) & (a[2] | a[3]));
  end

endmodule
