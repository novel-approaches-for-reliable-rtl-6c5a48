// bch_storage_buffer: the decoder's storage buffer, a first-in first-out queue of DEPTH
// entries for codewords that found no idle decoding path.
//
// Each entry is W bits (codeword, tag and n_EEB packed by the caller). The design sizes
// the buffer at 4, 8 or 16 words; FIFO order is this implementation's choice.
//
// Interface: `push` writes `din` when not full; `pop` removes the head when not empty;
// both may happen in one cycle. `dout` shows the head (first-word fall-through) and is
// valid while !empty. Pushing when full or popping when empty is a caller error
// (asserted in simulation).
module bch_storage_buffer #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned W     = 523
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [W-1:0]               din,
  input  logic                       pop,
  output logic [W-1:0]               dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_q, wr_q;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push && !full) mem[wr_q] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push && !full)  wr_q <= incr(wr_q);
      if (pop  && !empty) rd_q <= incr(rd_q);
      if ((push && !full) && !(pop && !empty))      cnt_q <= cnt_q + 1'b1;
      else if (!(push && !full) && (pop && !empty)) cnt_q <= cnt_q - 1'b1;
    end
  end

  assign dout  = mem[rd_q];
  assign empty = (cnt_q == '0);
  assign full  = (cnt_q == ($clog2(DEPTH+1))'(DEPTH));
  assign count = cnt_q;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
