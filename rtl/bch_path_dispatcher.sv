// bch_path_dispatcher: decoding-path selection of the adaptive multi-path decoder.
//
// Rule (from the design): a codeword with estimate n_EEB goes to the idle path with the
// smallest target t >= n_EEB; if the natural path is busy, the next stronger idle path is
// used; if none is idle the word waits. Paths are ordered by strength, path p having
// target T_OF(p) = 2p + 1 (t = 1, 3, 5, 7).
//
// Two requests are served per cycle: the storage-buffer head first, then the incoming
// word from the remaining idle paths (this priority is this implementation's choice, so
// buffered words are not overtaken for the path they need). Grants are one-hot, or zero
// when no suitable path is idle. Purely combinational.
module bch_path_dispatcher #(
  parameter int unsigned NP = 4
) (
  input  logic [NP-1:0] path_idle,
  input  logic          head_valid,
  input  logic [3:0]    head_neeb,
  input  logic          new_valid,
  input  logic [3:0]    new_neeb,
  output logic [NP-1:0] head_grant,
  output logic [NP-1:0] new_grant
);

  function automatic logic [NP-1:0] pick(input logic [NP-1:0] idle, input logic [3:0] neeb);
    logic [NP-1:0] g;
    g = '0;
    for (int p = NP - 1; p >= 0; p--) begin
      if (idle[p] && (2*p + 1 >= int'(neeb))) g = NP'(1) << p;
    end
    return g;
  endfunction

  always_comb begin
    head_grant = head_valid ? pick(path_idle, head_neeb) : '0;
    new_grant  = new_valid  ? pick(path_idle & ~head_grant, new_neeb) : '0;
  end

endmodule
