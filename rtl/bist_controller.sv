// bist_controller: test controller that runs a frequency sweep.
//
// For each frequency step the controller sets the DDS frequency word, empties
// the two accumulators, lets the circuit under test settle for a given number
// of samples, accumulates exactly n_samples products (the accumulation cycle
// N, the same for both accumulators), waits for the multiplier pipeline to
// drain and, in frequency-response mode, starts the analyzer and waits for
// it.  It then reports the step (step_done with step_idx and the frequency
// word of the step) and moves the frequency word on: by fr_step (linear
// sweep) or by doubling it (octave sweep).  After num_steps steps it pulses
// sweep_done and returns to idle.  In linearity mode it makes one
// measurement of the two-tone test and does not start the analyzer.
//
// Interface: all configuration inputs are sampled when start is high in
// idle.  sample_en is the converter sample strobe; the phase accumulators
// and the accumulation advance only on it.  acc_en is sample_en gated by the
// accumulation window.
// States: IDLE, CLEAR, SETTLE, ACCUM, DRAIN, ANALYZE, REPORT.
// Sweeping the frequency word and ending both accumulations at the same N
// follow the design description; the settle time, the step sequence, the
// sweep laws and the handshakes are this design's own choices.
module bist_controller
  import bist_pkg::*;
#(
  parameter int unsigned FREQ_W   = FREQ_W_DEF,
  parameter int unsigned M        = M_DEF,
  parameter int unsigned STEP_W   = 8,
  parameter int unsigned SETTLE_W = 16,
  parameter int unsigned DRAIN    = 4      // clocks for the MAC pipeline
) (
  input  logic                clk,
  input  logic                rst_n,
  // configuration and command
  input  logic                start,
  input  bist_mode_e          mode,
  input  sweep_e              sweep,
  input  logic [FREQ_W-1:0]   fr_start,
  input  logic [FREQ_W-1:0]   fr_step,
  input  logic [STEP_W-1:0]   num_steps,   // frequency steps (0 is taken as 1)
  input  logic [M-1:0]        n_samples,   // accumulation cycle N (>= 1)
  input  logic [SETTLE_W-1:0] settle,      // samples skipped before accumulating
  input  logic                sample_en,
  // to the generator and analyzer
  output bist_mode_e          mode_o,
  output logic [FREQ_W-1:0]   fr_o,
  output logic                tpg_clr,
  output logic                acc_clr,
  output logic                acc_en,
  output logic                ana_start,
  input  logic                ana_done,
  // status
  output logic                busy,
  output logic                step_done,
  output logic [STEP_W-1:0]   step_idx,
  output logic                sweep_done
);
  typedef enum logic [2:0] {
    S_IDLE, S_CLEAR, S_SETTLE, S_ACCUM, S_DRAIN, S_ANALYZE, S_REPORT
  } state_e;

  localparam int unsigned DW = $clog2(DRAIN + 1);

  state_e              state_q;
  sweep_e              sweep_q;
  logic [FREQ_W-1:0]   step_q;
  logic [STEP_W-1:0]   nsteps_q;
  logic [M-1:0]        nsamp_q, scnt_q;
  logic [SETTLE_W-1:0] settle_q, tcnt_q;
  logic [DW-1:0]       dcnt_q;
  logic                first_q;
  logic                last_step;

  assign busy      = (state_q != S_IDLE);
  assign last_step  = (step_idx == nsteps_q - STEP_W'(1));
  // step_done is high for the one REPORT clock, while step_idx and fr_o
  // still show the step that has just finished.
  assign step_done  = (state_q == S_REPORT);
  assign sweep_done = step_done && last_step;
  assign acc_en = (state_q == S_ACCUM) && sample_en;
  // The clears act on the clock edge that leaves CLEAR; the generator phases
  // restart only at the first step of a sweep.
  assign acc_clr = (state_q == S_CLEAR);
  assign tpg_clr = (state_q == S_CLEAR) && first_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      mode_o     <= MODE_FREQ_RESP;
      sweep_q    <= SWEEP_LINEAR;
      fr_o       <= '0;
      step_q     <= '0;
      nsteps_q   <= '0;
      nsamp_q    <= '0;
      settle_q   <= '0;
      scnt_q     <= '0;
      tcnt_q     <= '0;
      dcnt_q     <= '0;
      step_idx   <= '0;
      first_q    <= 1'b0;
      ana_start  <= 1'b0;
    end else begin
      ana_start  <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          mode_o   <= mode;
          sweep_q  <= sweep;
          fr_o     <= fr_start;
          step_q   <= fr_step;
          nsteps_q <= (mode == MODE_LINEARITY || num_steps == '0) ? STEP_W'(1) : num_steps;
          nsamp_q  <= (n_samples == '0) ? M'(1) : n_samples;
          settle_q <= settle;
          step_idx <= '0;
          first_q  <= 1'b1;
          state_q  <= S_CLEAR;
        end
        S_CLEAR: begin
          first_q <= 1'b0;
          scnt_q  <= '0;
          tcnt_q  <= '0;
          state_q <= (settle_q == '0) ? S_ACCUM : S_SETTLE;
        end
        S_SETTLE: if (sample_en) begin
          tcnt_q <= tcnt_q + SETTLE_W'(1);
          if (tcnt_q == settle_q - SETTLE_W'(1)) state_q <= S_ACCUM;
        end
        S_ACCUM: if (sample_en) begin
          scnt_q <= scnt_q + M'(1);
          if (scnt_q == nsamp_q - M'(1)) begin
            dcnt_q  <= '0;
            state_q <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          dcnt_q <= dcnt_q + DW'(1);
          if (dcnt_q == DW'(DRAIN - 1)) begin
            if (mode_o == MODE_FREQ_RESP) begin
              ana_start <= 1'b1;
              state_q   <= S_ANALYZE;
            end else begin
              state_q   <= S_REPORT;
            end
          end
        end
        S_ANALYZE: if (ana_done) state_q <= S_REPORT;
        S_REPORT: begin
          if (last_step) begin
            state_q <= S_IDLE;
          end else begin
            step_idx <= step_idx + STEP_W'(1);
            fr_o     <= (sweep_q == SWEEP_OCTAVE) ? (fr_o << 1) : (fr_o + step_q);
            state_q  <= S_CLEAR;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  ap_analyzer_done_only_when_waiting: assert property (
    @(posedge clk) disable iff (!rst_n) ana_done |-> (state_q == S_ANALYZE))
    else $error("bist_controller: analyzer done outside the analyze state");
  ap_accumulate_only_in_window: assert property (
    @(posedge clk) disable iff (!rst_n) acc_en |-> (state_q == S_ACCUM));
endmodule
