// bch_path: one complete decoding path of the adaptive decoder, correcting up to T errors
// in a 511-bit binary BCH codeword (BCH1..BCH4 are this module with T = 1, 3, 5, 7).
//
// Stages, run in sequence on the codeword held in a 511-bit register:
//   SYND  : the word is streamed r_510 first into bch_syndrome, 511 cycles.
//   ELP   : the error-locator polynomial is solved: Peterson (bch_elp_peterson, 1 cycle)
//           for T <= 3, SiBM (bch_elp_sibm, T cycles) for T > 3, as the design prescribes.
//           If every syndrome is zero the word is error-free and the path goes straight to
//           DONE (an early exit of this implementation).
//   CHIEN : bch_chien tests all 511 candidate roots; each root flips the bit at its
//           position, 511 cycles.
//   DONE  : the corrected word is held with `done` high until `ack`.
// `fail` is raised when the number of roots found differs from the locator degree (more
// errors than the path can correct); the word is then returned as received.
//
// Latency, counted from the cycle in which `start` is sampled to the first cycle with
// `done` high: 1026 cycles for the Peterson paths and 1026 + T for the SiBM paths when the
// word has errors, 513 when it is error-free. `idle` is high only in IDLE; `start` is ignored otherwise.
module bch_path
  import gf9_pkg::*;
#(
  parameter int unsigned T      = 7,
  parameter int unsigned TAG_W  = 8,
  parameter int unsigned NEEB_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N-1:0]      word_in,
  input  logic [TAG_W-1:0]  tag_in,
  input  logic [NEEB_W-1:0] neeb_in,
  output logic              idle,
  output logic              done,
  input  logic              ack,
  output logic [N-1:0]      word_out,
  output logic [TAG_W-1:0]  tag_out,
  output logic [NEEB_W-1:0] neeb_out,
  output logic [2:0]        nerr,
  output logic              fail
);

  typedef enum logic [2:0] {S_IDLE, S_SYND, S_ELP_GO, S_ELP, S_CHIEN, S_DONE} state_e;
  state_e st_q;

  logic [N-1:0]  word_q;      // corrected in place during CHIEN
  logic [N-1:0]  rx_q;        // copy kept for the failure case
  logic [8:0]    cnt_q;
  logic [3:0]    roots_q;

  // ---------------- syndrome
  gf_t  syn [2*T+1];
  logic syn_clear, syn_bit_valid, syn_bit;
  assign syn_clear     = (st_q == S_IDLE) && start;
  assign syn_bit_valid = (st_q == S_SYND);
  assign syn_bit       = rx_q[9'(N - 1) - cnt_q];

  bch_syndrome #(.T(T)) u_syn (
    .clk, .clear(syn_clear), .bit_valid(syn_bit_valid), .bit_in(syn_bit), .syn
  );

  logic syn_zero;
  always_comb begin
    syn_zero = 1'b1;
    for (int j = 1; j <= int'(2*T); j++) if (syn[j] != '0) syn_zero = 1'b0;
  end

  // ---------------- error-locator polynomial
  logic elp_start, elp_done;
  gf_t  lambda [T+1];
  assign elp_start = (st_q == S_ELP_GO) && !syn_zero;

  if (T <= 3) begin : g_peterson
    bch_elp_peterson #(.T(T)) u_elp (
      .clk, .rst_n, .start(elp_start), .syn, .done(elp_done), .lambda
    );
  end else begin : g_sibm
    bch_elp_sibm #(.T(T)) u_elp (
      .clk, .rst_n, .start(elp_start), .syn, .done(elp_done), .lambda
    );
  end

  // degree of the locator
  logic [3:0] lam_deg;
  always_comb begin
    lam_deg = '0;
    for (int i = 1; i <= int'(T); i++) if (lambda[i] != '0) lam_deg = 4'(i);
  end

  // ---------------- Chien search
  logic       ch_root_valid, ch_root, ch_done;
  logic [8:0] ch_pos;
  bch_chien #(.T(T)) u_chien (
    .clk, .rst_n, .start(elp_done), .lambda,
    .root_valid(ch_root_valid), .root(ch_root), .pos(ch_pos), .done(ch_done)
  );

  // ---------------- control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q     <= S_IDLE;
      cnt_q    <= '0;
      roots_q  <= '0;
      word_q   <= '0;
      rx_q     <= '0;
      tag_out  <= '0;
      neeb_out <= '0;
      nerr     <= '0;
      fail     <= 1'b0;
    end else begin
      unique case (st_q)
        S_IDLE: if (start) begin
          word_q   <= word_in;
          rx_q     <= word_in;
          tag_out  <= tag_in;
          neeb_out <= neeb_in;
          cnt_q    <= '0;
          roots_q  <= '0;
          nerr     <= '0;
          fail     <= 1'b0;
          st_q     <= S_SYND;
        end
        S_SYND: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == 9'(N - 1)) st_q <= S_ELP_GO;
        end
        S_ELP_GO: st_q <= syn_zero ? S_DONE : S_ELP;
        S_ELP:    if (elp_done) st_q <= S_CHIEN;
        S_CHIEN: begin
          if (ch_root_valid && ch_root) begin
            word_q[ch_pos] <= ~word_q[ch_pos];
            roots_q        <= roots_q + 1'b1;
          end
          if (ch_done) begin
            if (roots_q != lam_deg) begin
              fail   <= 1'b1;
              word_q <= rx_q;
              nerr   <= '0;
            end else begin
              nerr   <= 3'(roots_q);
            end
            st_q <= S_DONE;
          end
        end
        S_DONE: if (ack) st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end

  assign idle     = (st_q == S_IDLE);
  assign done     = (st_q == S_DONE);
  assign word_out = word_q;

endmodule
