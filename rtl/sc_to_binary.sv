// sc_to_binary: stochastic-to-binary conversion, a CW-bit counter of the ones in a
// stochastic stream. `clear` zeroes it (priority), and each cycle with `en` high adds
// `bit_in`. The counter form is this implementation's choice; the design names the block
// in its EQSNG figure. CW = NB + 1 holds a full 2^NB-bit stream count.
module sc_to_binary #(
  parameter int unsigned CW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          en,
  input  logic          bit_in,
  output logic [CW-1:0] count
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear)  count <= '0;
    else if (en && bit_in) count <= count + 1'b1;
  end

endmodule
