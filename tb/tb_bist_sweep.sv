// tb_bist_sweep: full frequency-response sweep of a first-order low pass at
// the default sizes, producing a phase and gain curve.
//
// Seven octave steps, frequency words 1 to 64 (tones from 1/65536 to 1/1024
// of the sample rate), through a low pass whose corner lies near word 12, so
// the curve runs from almost no delay to about 79 degrees and from 0 dB to
// about -14 dB.  Each step accumulates N = 2^17 - 1 samples.  For every
// step the measured phase must be within 1 degree and the gain, in dB
// relative to the first step, within 0.3 dB of the channel's closed-form
// response; the phase must grow and the gain fall from step to step.
module tb_bist_sweep;
  import bist_pkg::*;
  localparam int unsigned D = D_DEF, FREQ_W = FREQ_W_DEF, P = P_DEF, M = M_DEF;
  localparam int unsigned ANG_W = ANG_W_DEF, ACC_W = 2 * D + M;
  localparam real PI = 3.141592653589793;
  localparam real ALPHA = 0.0012, GAIN = 1.0;
  localparam int  NSAMP = (1 << M) - 1, SETTLE = 12000, STEPS = 7;

  logic                    clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic                    sample_en = 1'b1;
  logic [D-1:0]            dac_o, adc_i;
  logic                    busy, step_done, sweep_done;
  logic [7:0]              step_idx;
  logic [FREQ_W-1:0]       step_fr;
  logic signed [ACC_W-1:0] dc3, dc4;
  logic [ANG_W-1:0]        phase;
  logic [ACC_W-1:0]        amp;
  logic [1:0]              quadrant;
  logic                    gain_valid, gain_pass, im3_valid, im3_pass;
  int                      checks = 0, failures = 0;

  bist_top dut (
    .clk, .rst_n, .start, .mode(MODE_FREQ_RESP), .sweep(SWEEP_OCTAVE),
    .fr_start(FREQ_W'(1)), .fr_step('0), .num_steps(8'(STEPS)), .n_samples(M'(NSAMP)),
    .settle(16'(SETTLE)), .phase_adj('0), .f1('0), .f2('0), .gain_spec('0),
    .im3_spec('0), .sample_en, .dac_o, .adc_i, .busy, .step_done, .sweep_done,
    .step_idx, .step_fr, .dc3, .dc4, .phase, .amp, .quadrant, .gain_valid,
    .gain_pass, .im3_valid, .im3_pass);

  dut_channel_model #(.D(D), .ALPHA(ALPHA), .GAIN(GAIN), .OFFSET(4.0), .LAT(0)) chan (
    .clk, .sample_en, .c3(0.0), .dac_code(dac_o), .adc_code(adc_i));

  always #5 clk = ~clk;

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real lag_deg(real fr);
    real w;
    w = 2.0 * PI * fr / 65536.0;
    return (w + $atan2((1.0 - ALPHA) * $sin(w), 1.0 - (1.0 - ALPHA) * $cos(w))) * 180.0 / PI;
  endfunction
  function automatic real gain_lin(real fr);
    real w, re, im;
    w  = 2.0 * PI * fr / 65536.0;
    re = 1.0 - (1.0 - ALPHA) * $cos(w);
    im = (1.0 - ALPHA) * $sin(w);
    return GAIN * ALPHA / $sqrt(re * re + im * im);
  endfunction

  initial begin
    real amp0, ph, db, want_db, last_ph, last_db;
    int  steps;
    steps = 0; amp0 = 1.0; last_ph = -1.0; last_db = 1.0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!sweep_done) begin
      @(negedge clk);
      if (step_done) begin
        ph = real'(phase) * 360.0 / 65536.0;
        if (steps == 0) amp0 = real'(amp) / gain_lin(real'(step_fr)) * gain_lin(1.0);
        db      = 20.0 * $log10(real'(amp) / amp0);
        want_db = 20.0 * $log10(gain_lin(real'(step_fr)) / gain_lin(1.0));
        $display("fr=%0d  phase %.2f deg (model %.2f)  gain %.2f dB (model %.2f)",
                 step_fr, ph, lag_deg(real'(step_fr)), db, want_db);
        checks += 4;
        if (ph - lag_deg(real'(step_fr)) > 1.0 || lag_deg(real'(step_fr)) - ph > 1.0) failures++;
        if (db - want_db > 0.3 || want_db - db > 0.3) failures++;
        if (ph <= last_ph) failures++;
        if (steps > 0 && db >= last_db) failures++;
        last_ph = ph; last_db = db;
        steps++;
      end
    end
    checks++;
    if (steps != STEPS) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
