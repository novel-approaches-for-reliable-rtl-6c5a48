// eqsng_edge_detector: EQSNG stochastic edge detector for one 2x2 window of NB-bit pixels.
//
// Data path (the design's EQSNG figure): direction-vector RAM -> LD generator (counter,
// AND, XOR) -> comparators (stream bit = LD number < pixel) -> Roberts-cross circuit ->
// stochastic-to-binary counter. All four pixel comparators share dimension 0 of the LD
// generator, so their streams are maximally correlated as the XOR-based difference needs;
// the 0.5 select stream is dimension 1 compared with 2^(NB-1). eqsng_controller runs the
// stream one cycle at a time until `target_met` or `max_cycles`.
//
// Result: after `done`, `ones` / `cycles` estimates (|p00-p11| + |p01-p10|) / 2^(NB+1),
// and `energy` = power x cycles. `target_met` is supplied from outside (the design judges
// PSNR in software) and may look at `ones` and `cycles` while the run is in progress.
module eqsng_edge_detector #(
  parameter int unsigned NB = 8,
  parameter int unsigned PW = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [NB-1:0]         p00,
  input  logic [NB-1:0]         p01,
  input  logic [NB-1:0]         p10,
  input  logic [NB-1:0]         p11,
  input  logic [NB:0]           max_cycles,
  input  logic                  target_met,
  input  logic [PW-1:0]         power,
  input  logic                  dv_we,
  input  logic                  dv_dim,
  input  logic [$clog2(NB)-1:0] dv_idx,
  input  logic [NB-1:0]         dv_data,
  output logic                  done,
  output logic                  hit_limit,
  output logic [NB:0]           ones,
  output logic [NB:0]           cycles,
  output logic [PW+NB:0]        energy
);

  logic [NB-1:0] vec [2][NB];
  logic [NB-1:0] ld  [2];
  logic          run, clear;
  logic          s00, s01, s10, s11, sel, z;

  qsng_direction_ram #(.NB(NB), .DIMS(2)) u_ram (
    .clk, .rst_n, .we(dv_we), .wdim(dv_dim), .widx(dv_idx), .wdata(dv_data), .vec
  );

  qsng_ld_generator #(.NB(NB), .DIMS(2)) u_ld (
    .clk, .rst_n, .clear, .inc(run), .vec, .ld
  );

  // comparators
  assign s00 = (ld[0] < p00);
  assign s01 = (ld[0] < p01);
  assign s10 = (ld[0] < p10);
  assign s11 = (ld[0] < p11);
  assign sel = (ld[1] < NB'(1 << (NB - 1)));

  sc_roberts_cross u_rc (.x00(s00), .x01(s01), .x10(s10), .x11(s11), .sel, .z);

  sc_to_binary #(.CW(NB + 1)) u_s2b (.clk, .rst_n, .clear, .en(run), .bit_in(z), .count(ones));

  eqsng_controller #(.NB(NB), .PW(PW)) u_ctl (
    .clk, .rst_n, .start, .max_cycles, .target_met, .power,
    .run, .clear, .done, .hit_limit, .cycles, .energy
  );

endmodule
