// neeb_estimator: estimated number of error bits (n_EEB) of a codeword from the
// temperature of the DRAM region it was read from.
//
// The design derives a bit-error probability from the on-chip temperature sensors and,
// for a chosen confidence level, the upper bound n_EEB on the errors in the word. The
// monotone mapping temperature -> n_EEB is realised here as eight programmable thresholds:
// n_EEB = number of thresholds the temperature reaches (0..8), where 8 means "more than 7
// errors" (not correctable by any path). Software writes the table for the calibration
// and confidence level in use; the table form and its reset contents are this
// implementation's choices.
//
// Interface: synchronous threshold writes (cfg_we, cfg_idx, cfg_thr); `neeb` is a
// combinational function of `temp` and the table. Thresholds should be ascending.
module neeb_estimator #(
  parameter int unsigned TEMP_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [2:0]        cfg_idx,
  input  logic [TEMP_W-1:0] cfg_thr,
  input  logic [TEMP_W-1:0] temp,
  output logic [3:0]        neeb
);

  localparam int unsigned RESET_THR [8] = '{50, 60, 70, 80, 85, 90, 95, 100};

  logic [TEMP_W-1:0] thr_q [8];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) thr_q[i] <= TEMP_W'(RESET_THR[i]);
    end else if (cfg_we) begin
      thr_q[cfg_idx] <= cfg_thr;
    end
  end

  always_comb begin
    neeb = '0;
    for (int i = 0; i < 8; i++) if (temp >= thr_q[i]) neeb = neeb + 4'd1;
  end

endmodule
