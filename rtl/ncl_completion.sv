// ncl_completion: completion detection for an NCL register of WIDTH bits.
//
// Combines the per-bit ko signals with hysteresis: the output rises only when every ko
// is 1 (the whole register holds NULL, so it requests DATA) and falls only when every ko
// is 0 (the whole register holds DATA, so it requests NULL). Built as a tree of TH44
// gates over groups of four followed by one THgg gate over the g group outputs
// (WIDTH <= 16). The tree shape is this implementation's choice.
//
// Asynchronous, no clock; rst forces the output to 0 (request NULL). Reset should be
// released with all ko high so the output then rises to request the first DATA.
module ncl_completion #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             rst,
  input  logic [WIDTH-1:0] ko,
  output logic             kout
);

  localparam int unsigned G = (WIDTH + 3) / 4;

  logic [G-1:0] grp;

  for (genvar g = 0; g < int'(G); g++) begin : g_grp
    localparam int unsigned SZ = ((WIDTH - 4*g) < 4) ? (WIDTH - 4*g) : 4;
    if (SZ == 1) begin : g_one
      assign grp[g] = ko[4*g];
    end else begin : g_th
      ncl_th_gate #(.N(SZ), .M(SZ)) u_th (.rst, .a(ko[4*g +: SZ]), .z(grp[g]));
    end
  end

  if (G == 1) begin : g_single
    assign kout = grp[0];
  end else begin : g_final
    ncl_th_gate #(.N(G), .M(G)) u_th (.rst, .a(grp), .z(kout));
  end

  initial assert (WIDTH >= 1 && WIDTH <= 16) else $error("ncl_completion: WIDTH must be 1..16");

endmodule
