// bist_top: DDS-based built-in self-test for analog frequency response and
// linearity of a mixed-signal system.
//
// The digital side of a mixed-signal chip tests its own analog path: a
// direct digital synthesizer (dds_tpg) drives test tones into the existing
// DAC, the tone passes the analog circuit under test, comes back through the
// existing ADC (adc_i) and is analysed by two multiplier/accumulators
// (ora_mac).  Only the DAC, circuit and ADC are outside this module; their
// signals are the ports dac_o, adc_i and sample_en.
//
// Frequency-response mode: the DAC tone is cos(wt - phase_adj); accumulator
// A multiplies the returned samples by cos(wt) and gives DC3, accumulator B
// by sin(wt) and gives DC4.  After N samples the analyzer (freq_analyzer)
// derives the phase delay of the circuit from the signs and the ratio of DC3
// and DC4, and the phase-corrected amplitude sqrt(DC3^2 + DC4^2), so that
// gain and phase come out of one accumulation per frequency.  The controller
// (bist_controller) sweeps the frequency word over num_steps steps.
// Linearity mode: two tones f1 and f2 are summed into the DAC; accumulator A
// correlates with f2 (gain), accumulator B with 2*f2 - f1 (third-order
// intermodulation); two comparators (spec_comparator) check them against
// gain_spec (lower limit) and im3_spec (upper limit).
//
// Interface: configuration ports are sampled on start.  dc3/dc4, phase,
// amp and quadrant are valid while step_done is high, together with
// step_idx and step_fr of that step, and hold until the next step clears
// the accumulators.  gain_pass/im3_pass are registered on step_done and
// valid from the clock after it (gain_valid/im3_valid).
// Timing: one clock domain; sample_en marks the converter sample instants.
// From the generator's phase register to dac_o is one clock (table
// register); whatever the external path adds shows up as phase delay.
// The block structure follows the design description; the controller, the
// result format and the port-level configuration (which would come from a
// host interface) are this design's own choices.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned D        = D_DEF,
  parameter int unsigned FREQ_W   = FREQ_W_DEF,
  parameter int unsigned P        = P_DEF,
  parameter int unsigned M        = M_DEF,
  parameter int unsigned ANG_W    = ANG_W_DEF,
  parameter int unsigned STEP_W   = 8,
  parameter int unsigned SETTLE_W = 16,
  parameter int unsigned ACC_W    = 2 * D + M
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration and command
  input  logic                    start,
  input  bist_mode_e              mode,
  input  sweep_e                  sweep,
  input  logic [FREQ_W-1:0]       fr_start,
  input  logic [FREQ_W-1:0]       fr_step,
  input  logic [STEP_W-1:0]       num_steps,
  input  logic [M-1:0]            n_samples,
  input  logic [SETTLE_W-1:0]     settle,
  input  logic [P-1:0]            phase_adj,
  input  logic [FREQ_W-1:0]       f1,
  input  logic [FREQ_W-1:0]       f2,
  input  logic [ACC_W-1:0]        gain_spec,
  input  logic [ACC_W-1:0]        im3_spec,
  // converter side
  input  logic                    sample_en,
  output logic [D-1:0]            dac_o,
  input  logic [D-1:0]            adc_i,
  // results
  output logic                    busy,
  output logic                    step_done,
  output logic                    sweep_done,
  output logic [STEP_W-1:0]       step_idx,
  output logic [FREQ_W-1:0]       step_fr,
  output logic signed [ACC_W-1:0] dc3,
  output logic signed [ACC_W-1:0] dc4,
  output logic [ANG_W-1:0]        phase,
  output logic [ACC_W-1:0]        amp,
  output logic [1:0]              quadrant,
  output logic                    gain_valid,
  output logic                    gain_pass,
  output logic                    im3_valid,
  output logic                    im3_pass
);
  bist_mode_e       mode_run;
  logic             tpg_clr, acc_clr, acc_en, ana_start, ana_done, ana_busy;
  logic [D-1:0]     ref_a, ref_b;
  logic             lin_eval;

  bist_controller #(
    .FREQ_W(FREQ_W), .M(M), .STEP_W(STEP_W), .SETTLE_W(SETTLE_W)
  ) u_ctrl (
    .clk, .rst_n, .start, .mode, .sweep, .fr_start, .fr_step, .num_steps,
    .n_samples, .settle, .sample_en,
    .mode_o(mode_run), .fr_o(step_fr), .tpg_clr, .acc_clr, .acc_en,
    .ana_start, .ana_done,
    .busy, .step_done, .step_idx, .sweep_done);

  dds_tpg #(.D(D), .FREQ_W(FREQ_W), .P(P)) u_tpg (
    .clk, .rst_n, .clr(tpg_clr), .ce(sample_en), .mode(mode_run),
    .fr(step_fr), .phase_adj, .f1, .f2,
    .dac_o, .ref_a_o(ref_a), .ref_b_o(ref_b));

  // Accumulator3 (DC3, in-phase) and Accumulator4 (DC4, quadrature).
  ora_mac #(.D(D), .M(M), .ACC_W(ACC_W)) u_mac_a (
    .clk, .rst_n, .clr(acc_clr), .en(acc_en),
    .ref_i(ref_a), .adc_i, .acc_o(dc3));
  ora_mac #(.D(D), .M(M), .ACC_W(ACC_W)) u_mac_b (
    .clk, .rst_n, .clr(acc_clr), .en(acc_en),
    .ref_i(ref_b), .adc_i, .acc_o(dc4));

  freq_analyzer #(.ACC_W(ACC_W), .ANG_W(ANG_W)) u_ana (
    .clk, .rst_n, .start(ana_start), .dc3, .dc4,
    .busy(ana_busy), .done(ana_done), .phase_o(phase), .amp_o(amp),
    .quadrant_o(quadrant));

  assign lin_eval = step_done && (mode_run == MODE_LINEARITY);

  spec_comparator #(.ACC_W(ACC_W), .LOWER_LIMIT(1'b1)) u_gain_cmp (
    .clk, .rst_n, .clr(acc_clr), .eval(lin_eval), .value(dc3),
    .spec(gain_spec), .valid_o(gain_valid), .pass_o(gain_pass));
  spec_comparator #(.ACC_W(ACC_W), .LOWER_LIMIT(1'b0)) u_im3_cmp (
    .clk, .rst_n, .clr(acc_clr), .eval(lin_eval), .value(dc4),
    .spec(im3_spec), .valid_o(im3_valid), .pass_o(im3_pass));

  ap_analyzer_idle_on_start: assert property (
    @(posedge clk) disable iff (!rst_n) ana_start |-> !ana_busy)
    else $error("bist_top: analyzer started while busy");
endmodule
