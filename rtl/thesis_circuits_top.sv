// thesis_circuits_top: top level holding the three independent designs side by side, each
// with its own ports (they share no signals):
//   bch_*  : adaptive multi-path (511,448) BCH decoder for DRAM words in a 3D processor,
//            clocked by clk / rst_n.
//   ncl_*  : NULL Convention Logic pipeline around a 4-bit ripple-carry adder (the circuit
//            the GDI, HYBRID and GNCL variants are built on), asynchronous, reset by ncl_rst.
//   eq_*   : EQSNG stochastic Roberts-cross edge detector for a 2x2 window, clocked by
//            clk / rst_n.
//   th24_* : one NCL TH24comp gate, the complex gate of the NCL cell library that the adder
//            does not use, brought out on its own ports (reset by ncl_rst).
// See each submodule for function and timing. Parameters are the design's defaults.
module thesis_circuits_top #(
  parameter int unsigned SIZE_BUF = 4,
  parameter int unsigned TAG_W    = 8,
  parameter int unsigned TEMP_W   = 8,
  parameter int unsigned NCL_W    = 4,
  parameter int unsigned NB       = 8,
  parameter int unsigned PW       = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // adaptive BCH decoder
  input  logic                        bch_in_valid,
  output logic                        bch_in_ready,
  input  logic [510:0]                bch_in_word,
  input  logic [TAG_W-1:0]            bch_in_tag,
  input  logic [TEMP_W-1:0]           bch_in_temp,
  input  logic                        bch_cfg_we,
  input  logic [2:0]                  bch_cfg_idx,
  input  logic [TEMP_W-1:0]           bch_cfg_thr,
  output logic                        bch_out_valid,
  input  logic                        bch_out_ready,
  output logic [510:0]                bch_out_word,
  output logic [447:0]                bch_out_data,
  output logic [TAG_W-1:0]            bch_out_tag,
  output logic [2:0]                  bch_out_path,
  output logic [2:0]                  bch_out_nerr,
  output logic                        bch_out_fail,
  output logic [3:0]                  bch_out_neeb,
  output logic [3:0]                  bch_path_busy,
  output logic [$clog2(SIZE_BUF+1)-1:0] bch_buf_count,
  // NCL ripple-carry adder pipeline (dual-rail {rail1, rail0})
  input  logic                        ncl_rst,
  input  logic [NCL_W-1:0][1:0]       ncl_a,
  input  logic [NCL_W-1:0][1:0]       ncl_b,
  input  logic [1:0]                  ncl_ci,
  output logic                        ncl_ko,
  input  logic                        ncl_ki,
  output logic [NCL_W-1:0][1:0]       ncl_s,
  output logic [1:0]                  ncl_co,
  input  logic [3:0]                  th24_a,
  output logic                        th24_z,
  // EQSNG edge detector
  input  logic                        eq_start,
  input  logic [NB-1:0]               eq_p00,
  input  logic [NB-1:0]               eq_p01,
  input  logic [NB-1:0]               eq_p10,
  input  logic [NB-1:0]               eq_p11,
  input  logic [NB:0]                 eq_max_cycles,
  input  logic                        eq_target_met,
  input  logic [PW-1:0]               eq_power,
  input  logic                        eq_dv_we,
  input  logic                        eq_dv_dim,
  input  logic [$clog2(NB)-1:0]       eq_dv_idx,
  input  logic [NB-1:0]               eq_dv_data,
  output logic                        eq_done,
  output logic                        eq_hit_limit,
  output logic [NB:0]                 eq_ones,
  output logic [NB:0]                 eq_cycles,
  output logic [PW+NB:0]              eq_energy
);

  adaptive_bch_decoder #(.SIZE_BUF(SIZE_BUF), .TAG_W(TAG_W), .TEMP_W(TEMP_W)) u_bch (
    .clk, .rst_n,
    .in_valid(bch_in_valid), .in_ready(bch_in_ready), .in_word(bch_in_word), .in_tag(bch_in_tag),
    .in_temp(bch_in_temp), .cfg_we(bch_cfg_we), .cfg_idx(bch_cfg_idx), .cfg_thr(bch_cfg_thr),
    .out_valid(bch_out_valid), .out_ready(bch_out_ready), .out_word(bch_out_word),
    .out_data(bch_out_data), .out_tag(bch_out_tag), .out_path(bch_out_path),
    .out_nerr(bch_out_nerr), .out_fail(bch_out_fail), .out_neeb(bch_out_neeb),
    .path_busy(bch_path_busy), .buf_count(bch_buf_count)
  );

  ncl_rca_pipeline #(.WIDTH(NCL_W)) u_ncl (
    .rst(ncl_rst), .a(ncl_a), .b(ncl_b), .ci(ncl_ci), .ko(ncl_ko), .ki(ncl_ki),
    .s(ncl_s), .co(ncl_co)
  );

  ncl_th24comp u_th24 (.rst(ncl_rst), .a(th24_a), .z(th24_z));

  eqsng_edge_detector #(.NB(NB), .PW(PW)) u_eq (
    .clk, .rst_n, .start(eq_start), .p00(eq_p00), .p01(eq_p01), .p10(eq_p10), .p11(eq_p11),
    .max_cycles(eq_max_cycles), .target_met(eq_target_met), .power(eq_power),
    .dv_we(eq_dv_we), .dv_dim(eq_dv_dim), .dv_idx(eq_dv_idx), .dv_data(eq_dv_data),
    .done(eq_done), .hit_limit(eq_hit_limit), .ones(eq_ones), .cycles(eq_cycles),
    .energy(eq_energy)
  );

endmodule
