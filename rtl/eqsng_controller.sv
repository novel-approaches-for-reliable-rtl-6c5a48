// eqsng_controller: run control of the energy-efficient quasi-stochastic number generation
// (EQSNG, Algorithm 1 of the design).
//
// On `start` the power figure is latched (Algorithm 1 computes Power when ClockCycles = 0),
// `clear` pulses for one cycle to reset the counters, and then the stream runs one clock
// cycle at a time (`run` high). Before each further cycle the accuracy verdict is checked:
// `target_met` (PSNR_current >= PSNR_target, evaluated outside on the current output with
// `cycles` cycles) ends the run, otherwise ClockCycles += 1. The first cycle always runs
// (PSNR_current starts at 0). A run also ends at `max_cycles` (an addition of this
// implementation so that an unreachable target terminates). At the end `done` rises and
// stays high until the next start, with `cycles` and `energy` = power x cycles.
//
// Timing: start sampled in IDLE or DONE; CLEAR lasts 1 cycle; RUN lasts `cycles` cycles
// plus one decision cycle; `done` and `energy` are valid from the cycle after the decision.
module eqsng_controller #(
  parameter int unsigned NB = 8,
  parameter int unsigned PW = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NB:0]      max_cycles,
  input  logic             target_met,
  input  logic [PW-1:0]    power,
  output logic             run,
  output logic             clear,
  output logic             done,
  output logic             hit_limit,
  output logic [NB:0]      cycles,
  output logic [PW+NB:0]   energy
);

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_RUN, S_DONE} state_e;
  state_e        st_q;
  logic [PW-1:0] power_q;
  logic          stop;

  assign stop  = (cycles != '0 && target_met) || (cycles >= max_cycles);
  assign run   = (st_q == S_RUN) && !stop;
  assign clear = (st_q == S_CLEAR);
  assign done  = (st_q == S_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q      <= S_IDLE;
      power_q   <= '0;
      cycles    <= '0;
      energy    <= '0;
      hit_limit <= 1'b0;
    end else begin
      unique case (st_q)
        S_IDLE, S_DONE: if (start) begin
          power_q   <= power;
          cycles    <= '0;
          hit_limit <= 1'b0;
          st_q      <= S_CLEAR;
        end
        S_CLEAR: st_q <= S_RUN;
        S_RUN: begin
          if (stop) begin
            energy    <= (PW+NB+1)'(power_q) * (PW+NB+1)'(cycles);
            hit_limit <= !(cycles != '0 && target_met);
            st_q      <= S_DONE;
          end else begin
            cycles <= cycles + 1'b1;
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

endmodule
