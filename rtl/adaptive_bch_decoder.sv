// adaptive_bch_decoder: adaptive 4-path (511,448) BCH decoder for DRAM words whose bit
// error rate varies with local temperature.
//
// Instead of one decoder sized for the worst case (t = 7), four independent paths with
// t = 1, 3, 5, 7 (BCH1..BCH4, module bch_path) are provided. For each codeword read, the
// temperature of its region gives an estimate n_EEB of its error count (neeb_estimator):
//   n_EEB = 0     the word needs no decoding and is passed through (bypass register);
//   1..7          it is sent to the idle path with the smallest t >= n_EEB
//                 (bch_path_dispatcher); if no suitable path is idle it waits in the
//                 storage buffer (bch_storage_buffer); if that is full the word is not
//                 accepted (in_ready low);
//   > 7           it is flagged uncorrectable and passed through with out_fail set.
// Several words are decoded in parallel when their estimates let them use different paths.
// This is the organisation the design describes; tags, the bypass register, the output
// arbiter (fixed priority: bypass, then BCH1..BCH4) and the valid/ready handshakes are
// this implementation's choices.
//
// Interfaces: input and output are valid/ready streams; a word is taken when
// in_valid && in_ready. Results may leave out of order and carry the input tag.
// out_data is the information part (bits 510..63) of a systematic codeword.
// Latency per word: bypass 1 cycle; a path adds about 2*511 cycles (see bch_path).
module adaptive_bch_decoder
  import gf9_pkg::*;
#(
  parameter int unsigned SIZE_BUF = 4,
  parameter int unsigned TAG_W    = 8,
  parameter int unsigned TEMP_W   = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // codeword stream from memory
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [N-1:0]      in_word,
  input  logic [TAG_W-1:0]  in_tag,
  input  logic [TEMP_W-1:0] in_temp,
  // n_EEB threshold table
  input  logic              cfg_we,
  input  logic [2:0]        cfg_idx,
  input  logic [TEMP_W-1:0] cfg_thr,
  // decoded stream
  output logic              out_valid,
  input  logic              out_ready,
  output logic [N-1:0]      out_word,
  output logic [K-1:0]      out_data,
  output logic [TAG_W-1:0]  out_tag,
  output logic [2:0]        out_path,
  output logic [2:0]        out_nerr,
  output logic              out_fail,
  output logic [3:0]        out_neeb,
  // status
  output logic [3:0]        path_busy,
  output logic [$clog2(SIZE_BUF+1)-1:0] buf_count
);

  localparam int unsigned NP = 4;
  localparam int unsigned EW = N + TAG_W + 4;   // buffer entry {neeb, tag, word}

  // ---------------- n_EEB estimate of the incoming word
  logic [3:0] in_neeb;
  neeb_estimator #(.TEMP_W(TEMP_W)) u_est (
    .clk, .rst_n, .cfg_we, .cfg_idx, .cfg_thr, .temp(in_temp), .neeb(in_neeb)
  );

  logic in_bypass;   // no decoding (0) or uncorrectable (> 7)
  assign in_bypass = (in_neeb == 4'd0) || (in_neeb > 4'd7);

  // ---------------- storage buffer
  logic          buf_push, buf_pop, buf_empty, buf_full;
  logic [EW-1:0] buf_dout;
  bch_storage_buffer #(.DEPTH(SIZE_BUF), .W(EW)) u_buf (
    .clk, .rst_n, .push(buf_push), .din({in_neeb, in_tag, in_word}), .pop(buf_pop),
    .dout(buf_dout), .empty(buf_empty), .full(buf_full), .count(buf_count)
  );

  logic [3:0]       head_neeb;
  logic [TAG_W-1:0] head_tag;
  logic [N-1:0]     head_word;
  assign {head_neeb, head_tag, head_word} = buf_dout;

  // ---------------- path selection
  logic [NP-1:0] p_idle, head_grant, new_grant;
  bch_path_dispatcher #(.NP(NP)) u_disp (
    .path_idle(p_idle),
    .head_valid(!buf_empty), .head_neeb,
    .new_valid(in_valid && !in_bypass), .new_neeb(in_neeb),
    .head_grant, .new_grant
  );

  // ---------------- bypass register
  logic             byp_valid_q;
  logic [N-1:0]     byp_word_q;
  logic [TAG_W-1:0] byp_tag_q;
  logic [3:0]       byp_neeb_q;
  logic             byp_ack;

  always_comb begin
    if (in_bypass)            in_ready = !byp_valid_q;
    else if (new_grant != '0) in_ready = 1'b1;
    else                      in_ready = !buf_full;
  end

  wire in_fire = in_valid && in_ready;
  assign buf_push = in_fire && !in_bypass && (new_grant == '0);
  assign buf_pop  = (head_grant != '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      byp_valid_q <= 1'b0;
      byp_word_q  <= '0;
      byp_tag_q   <= '0;
      byp_neeb_q  <= '0;
    end else begin
      if (byp_ack) byp_valid_q <= 1'b0;
      if (in_fire && in_bypass) begin
        byp_valid_q <= 1'b1;
        byp_word_q  <= in_word;
        byp_tag_q   <= in_tag;
        byp_neeb_q  <= in_neeb;
      end
    end
  end

  // ---------------- the four decoding paths
  logic             p_done [NP];
  logic             p_ack  [NP];
  logic [N-1:0]     p_word [NP];
  logic [TAG_W-1:0] p_tag  [NP];
  logic [3:0]       p_neeb [NP];
  logic [2:0]       p_nerr [NP];
  logic             p_fail [NP];

  for (genvar p = 0; p < NP; p++) begin : g_path
    wire from_head = head_grant[p];
    bch_path #(.T(2*p + 1), .TAG_W(TAG_W), .NEEB_W(4)) u_path (
      .clk, .rst_n,
      .start   (head_grant[p] || new_grant[p]),
      .word_in (from_head ? head_word : in_word),
      .tag_in  (from_head ? head_tag  : in_tag),
      .neeb_in (from_head ? head_neeb : in_neeb),
      .idle    (p_idle[p]),
      .done    (p_done[p]),
      .ack     (p_ack[p]),
      .word_out(p_word[p]),
      .tag_out (p_tag[p]),
      .neeb_out(p_neeb[p]),
      .nerr    (p_nerr[p]),
      .fail    (p_fail[p])
    );
    assign path_busy[p] = !p_idle[p];
  end

  // ---------------- output arbitration: bypass, then BCH1..BCH4
  always_comb begin
    logic found;
    found     = 1'b0;
    byp_ack   = 1'b0;
    for (int p = 0; p < int'(NP); p++) p_ack[p] = 1'b0;
    out_valid = 1'b0;
    out_word  = byp_word_q;
    out_tag   = byp_tag_q;
    out_neeb  = byp_neeb_q;
    out_path  = (byp_neeb_q == 4'd0) ? 3'd0 : 3'd7;
    out_nerr  = '0;
    out_fail  = (byp_neeb_q > 4'd7);
    if (byp_valid_q) begin
      found     = 1'b1;
      out_valid = 1'b1;
      byp_ack   = out_ready;
    end
    for (int p = 0; p < int'(NP); p++) begin
      if (!found && p_done[p]) begin
        found     = 1'b1;
        out_valid = 1'b1;
        out_word  = p_word[p];
        out_tag   = p_tag[p];
        out_neeb  = p_neeb[p];
        out_path  = 3'(p + 1);
        out_nerr  = p_nerr[p];
        out_fail  = p_fail[p];
        p_ack[p]  = out_ready;
      end
    end
  end

  assign out_data = out_word[N-1 -: K];

  // a word is never started on a busy path, nor granted twice
  a_grant_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 ((head_grant | new_grant) & ~p_idle) == '0);
  a_grant_excl: assert property (@(posedge clk) disable iff (!rst_n)
                                 (head_grant & new_grant) == '0);

endmodule
