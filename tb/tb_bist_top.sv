// tb_bist_top: end-to-end test of the whole BIST at its default sizes.
//
// The DAC output of the BIST drives a model of DAC -> first-order low pass
// -> ADC (dut_channel_model) whose phase and gain are known in closed form,
// and the ADC code is fed back.  The test runs:
//  1. an octave sweep (6 steps) at one sample per clock;
//  2. a linear sweep (3 steps) with a sample every second clock;
//  3. a phase-corrected measurement: the phase measured at one frequency is
//     fed back as the generator's phase adjustment, after which the phase
//     must read about 0 and DC3 must carry the whole amplitude;
//  4. two-tone linearity tests: a linear circuit (gain and IM3 pass), a
//     distorting circuit (IM3 fails) and a too-strict gain limit (gain fails).
// For every frequency step the phase must be within 1.5 degrees and the
// amplitude within 3 % of the values computed from the channel's transfer
// function, and the step must take settle + N samples plus the analyzer time.
// Each mechanism (octave and linear sweep, clock-enabled sampling, settle
// window, analyzer run, phase lag in the first and second quadrant, phase
// correction, gain pass/fail, IM3 pass/fail) is counted and must occur.
module tb_bist_top;
  import bist_pkg::*;
  localparam int unsigned D = D_DEF, FREQ_W = FREQ_W_DEF, P = P_DEF, M = M_DEF;
  localparam int unsigned ANG_W = ANG_W_DEF, ACC_W = 2 * D + M;
  localparam real PI = 3.141592653589793;
  localparam real ALPHA = 0.125, GAIN = 0.9;
  localparam int  LAT = 2;

  logic                    clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  bist_mode_e              mode = MODE_FREQ_RESP;
  sweep_e                  sweep = SWEEP_LINEAR;
  logic [FREQ_W-1:0]       fr_start = '0, fr_step = '0, f1 = '0, f2 = '0;
  logic [7:0]              num_steps = '0;
  logic [M-1:0]            n_samples = '0;
  logic [15:0]             settle = '0;
  logic [P-1:0]            phase_adj = '0;
  logic [ACC_W-1:0]        gain_spec = '0, im3_spec = '0;
  logic                    sample_en = 1'b0;
  logic [D-1:0]            dac_o, adc_i;
  logic                    busy, step_done, sweep_done;
  logic [7:0]              step_idx;
  logic [FREQ_W-1:0]       step_fr;
  logic signed [ACC_W-1:0] dc3, dc4;
  logic [ANG_W-1:0]        phase;
  logic [ACC_W-1:0]        amp;
  logic [1:0]              quadrant;
  logic                    gain_valid, gain_pass, im3_valid, im3_pass;
  real                     c3 = 0.0;
  int                      sample_div = 1;
  int                      checks = 0, failures = 0;

  // mechanism counters
  int n_octave, n_linear, n_gated, n_settle, n_ana, n_q1, n_q2, n_corr;
  int n_gain_pass, n_gain_fail, n_im3_pass, n_im3_fail;
  real last_phase_deg;

  bist_top dut (.*);

  dut_channel_model #(.D(D), .ALPHA(ALPHA), .GAIN(GAIN), .OFFSET(6.0), .LAT(LAT)) chan (
    .clk, .sample_en, .c3, .dac_code(dac_o), .adc_code(adc_i));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample strobe: one per sample_div clocks
  int div_cnt = 0;
  always @(posedge clk) begin
    if (div_cnt >= sample_div - 1) begin div_cnt <= 0; sample_en <= 1'b1; end
    else begin div_cnt <= div_cnt + 1; sample_en <= 1'b0; end
  end

  // expected lag (degrees) and gain of the channel at word fr
  function automatic real exp_lag(real fr);
    real w;
    w = 2.0 * PI * fr / 65536.0;
    return (w * (1 + LAT) + $atan2((1.0 - ALPHA) * $sin(w), 1.0 - (1.0 - ALPHA) * $cos(w)))
           * 180.0 / PI;
  endfunction
  function automatic real exp_gain(real fr);
    real w, re, im;
    w  = 2.0 * PI * fr / 65536.0;
    re = 1.0 - (1.0 - ALPHA) * $cos(w);
    im = (1.0 - ALPHA) * $sin(w);
    return GAIN * ALPHA / $sqrt(re * re + im * im);
  endfunction
  function automatic real wrap180(real d);
    while (d > 180.0)   d -= 360.0;
    while (d <= -180.0) d += 360.0;
    return d;
  endfunction

  // check one frequency-response step (called while step_done is high)
  task automatic check_step(int nsamp, real extra_adj_deg);
    real want_ph, got_ph, want_amp, err;
    want_ph  = wrap180(exp_lag(real'(step_fr)) - extra_adj_deg);
    got_ph   = wrap180(real'(phase) * 360.0 / 65536.0);
    want_amp = 127.0 * 127.0 * exp_gain(real'(step_fr)) / 2.0 * real'(nsamp);
    last_phase_deg = got_ph;
    err = wrap180(got_ph - want_ph);
    checks++;
    if (err > 1.5 || err < -1.5) begin
      failures++;
      $display("fr=%0d phase %f expected %f", step_fr, got_ph, want_ph);
    end
    checks++;
    if (real'(amp) > 1.03 * want_amp || real'(amp) < 0.97 * want_amp) begin
      failures++;
      $display("fr=%0d amplitude %0d expected %f", step_fr, amp, want_amp);
    end
    n_ana++;
    if (quadrant == 2'd0) n_q1++;
    if (quadrant == 2'd1) n_q2++;
    $display("step %0d fr=%0d DC3=%0d DC4=%0d phase=%.2f deg (model %.2f) amp=%0d (model %.0f)",
             step_idx, step_fr, dc3, dc4, got_ph, want_ph, amp, want_amp);
  endtask

  // run one sweep and check every step; returns the number of steps seen
  task automatic run(bist_mode_e md, sweep_e sw, int f0, int fs, int ns, int nsamp,
                     int st, real adj_deg);
    int steps, t0, clocks;
    @(negedge clk);
    mode = md; sweep = sw; fr_start = FREQ_W'(f0); fr_step = FREQ_W'(fs);
    num_steps = 8'(ns); n_samples = M'(nsamp); settle = 16'(st);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    steps = 0;
    t0 = 0;
    while (busy) begin
      @(posedge clk); #1;
      t0++;
      if (step_done) begin
        steps++;
        // settle + N samples, plus controller and analyzer overhead
        clocks = t0;
        checks++;
        if (clocks < (st + nsamp) * sample_div || clocks > (st + nsamp) * sample_div + 60) begin
          failures++;
          $display("step took %0d clocks, expected about %0d", clocks, (st + nsamp) * sample_div);
        end
        t0 = 0;
        if (st > 0) n_settle++;
        if (sample_div > 1) n_gated++;
        if (md == MODE_FREQ_RESP) begin
          check_step(nsamp, adj_deg);
          if (sw == SWEEP_OCTAVE) n_octave++; else n_linear++;
        end
      end
    end
    checks++;
    if (steps != ((md == MODE_LINEARITY) ? 1 : ns)) begin
      failures++;
      $display("%0d steps, expected %0d", steps, ns);
    end
    @(negedge clk);
  endtask

  // two-tone linearity measurement with given limits
  task automatic run_lin(real cubic, real gain_frac, real im3_frac, bit want_gain, bit want_im3);
    real g2, full;
    c3 = cubic;
    f1 = 16'd1024; f2 = 16'd1280;
    g2   = exp_gain(1280.0);
    // |DC3| of the f2 tone at N = 8192; the phase lag at f2 scales it
    full = 127.0 * 63.5 * g2 / 2.0 * 8192.0 * $cos(exp_lag(1280.0) * PI / 180.0);
    gain_spec = ACC_W'($rtoi(gain_frac * full));
    im3_spec  = ACC_W'($rtoi(im3_frac * full));
    run(MODE_LINEARITY, SWEEP_LINEAR, 0, 0, 1, 8192, 256, 0.0);
    checks += 3;
    if (!gain_valid || !im3_valid) failures++;
    if (gain_pass != want_gain) begin failures++; $display("gain pass %0d, DC3=%0d spec=%0d", gain_pass, dc3, gain_spec); end
    if (im3_pass != want_im3) begin failures++; $display("IM3 pass %0d, DC4=%0d spec=%0d", im3_pass, dc4, im3_spec); end
    if (gain_pass) n_gain_pass++; else n_gain_fail++;
    if (im3_pass) n_im3_pass++; else n_im3_fail++;
    $display("linearity c3=%.2f: DC3=%0d (spec %0d, pass %0d)  DC4=%0d (spec %0d, pass %0d)",
             cubic, dc3, gain_spec, gain_pass, dc4, im3_spec, im3_pass);
    c3 = 0.0;
  endtask

  initial begin
    n_octave = 0; n_linear = 0; n_gated = 0; n_settle = 0; n_ana = 0; n_q1 = 0;
    n_q2 = 0; n_corr = 0; n_gain_pass = 0; n_gain_fail = 0; n_im3_pass = 0; n_im3_fail = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    // 1. octave sweep 128 .. 4096, 16 periods at the lowest tone
    sample_div = 1;
    run(MODE_FREQ_RESP, SWEEP_OCTAVE, 128, 0, 6, 8192, 256, 0.0);
    // 2. linear sweep, one sample every second clock
    sample_div = 2;
    run(MODE_FREQ_RESP, SWEEP_LINEAR, 512, 512, 3, 4096, 128, 0.0);
    sample_div = 1;
    // 3. measure at 2048, then feed the phase back as the DAC phase advance
    run(MODE_FREQ_RESP, SWEEP_LINEAR, 2048, 0, 1, 8192, 256, 0.0);
    phase_adj = phase[ANG_W-1 -: P];
    begin
      real adj_deg;
      adj_deg = real'(phase_adj) * 360.0 / real'(1 << P);
      run(MODE_FREQ_RESP, SWEEP_LINEAR, 2048, 0, 1, 8192, 256, adj_deg);
      checks += 2;
      if (last_phase_deg > 1.5 || last_phase_deg < -1.5) begin
        failures++; $display("corrected phase %f", last_phase_deg);
      end
      if (real'(dc3) < 0.99 * real'(amp)) begin
        failures++; $display("corrected DC3 %0d below amplitude %0d", dc3, amp);
      end else n_corr++;
    end
    phase_adj = '0;
    // 4. linearity
    run_lin(0.0, 0.8, 0.01, 1'b1, 1'b1);
    run_lin(0.3, 0.8, 0.01, 1'b1, 1'b0);
    run_lin(0.0, 1.2, 0.01, 1'b0, 1'b1);
    // every mechanism must have happened
    $display("octave steps %0d, linear steps %0d, gated-sample steps %0d, settle windows %0d",
             n_octave, n_linear, n_gated, n_settle);
    $display("analyzer runs %0d, Q1 %0d, Q2 %0d, phase corrections %0d", n_ana, n_q1, n_q2, n_corr);
    $display("gain pass/fail %0d/%0d, IM3 pass/fail %0d/%0d", n_gain_pass, n_gain_fail,
             n_im3_pass, n_im3_fail);
    checks += 12;
    if (n_octave == 0) failures++;
    if (n_linear == 0) failures++;
    if (n_gated == 0) failures++;
    if (n_settle == 0) failures++;
    if (n_ana == 0) failures++;
    if (n_q1 == 0) failures++;
    if (n_q2 == 0) failures++;
    if (n_corr == 0) failures++;
    if (n_gain_pass == 0) failures++;
    if (n_gain_fail == 0) failures++;
    if (n_im3_pass == 0) failures++;
    if (n_im3_fail == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
