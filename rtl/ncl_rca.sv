// ncl_rca: WIDTH-bit dual-rail NULL Convention Logic ripple-carry adder, a chain of
// ncl_full_adder cells (carry of bit i feeds bit i+1).
//
// Signals are rail pairs {rail1, rail0} (01 = DATA0, 10 = DATA1, 00 = NULL). The adder is
// input-complete: the carry out and every sum bit reach DATA only after all inputs are
// DATA, and NULL only after all are NULL. The 4-bit width is the design's; the chain of
// full adders is this implementation's reading of "ripple carry adder".
//
// Asynchronous, no clock; rst forces every gate to NULL.
module ncl_rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic                  rst,
  input  logic [WIDTH-1:0][1:0] a,
  input  logic [WIDTH-1:0][1:0] b,
  input  logic [1:0]            ci,
  output logic [WIDTH-1:0][1:0] s,
  output logic [1:0]            co
);

  logic [WIDTH:0][1:0] c;
  assign c[0] = ci;

  for (genvar i = 0; i < int'(WIDTH); i++) begin : g_fa
    ncl_full_adder u_fa (.rst, .x(a[i]), .y(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end

  assign co = c[WIDTH];

endmodule
