// tb_bist_fig5: one full-length frequency-response measurement at the
// default sizes, the largest the accumulators are sized for.
//
// A single test tone of 1/1024 of the sample rate (frequency word 64) goes
// through a first-order low pass whose corner lies well below the tone, so
// that the circuit delays it by about 79 degrees.  The BIST accumulates
// N = 2^17 - 1 samples, the most a 17-bit count allows, into the 2D+M =
// 33-bit accumulators.  Checks: both DC3 and DC4 end positive with DC4 the
// larger (a phase between 45 and 90 degrees); the measured phase is within
// 1 degree and the amplitude within 3 % of the channel's closed-form
// response (so nothing overflowed); the step takes settle + N samples.
module tb_bist_fig5;
  import bist_pkg::*;
  localparam int unsigned D = D_DEF, FREQ_W = FREQ_W_DEF, P = P_DEF, M = M_DEF;
  localparam int unsigned ANG_W = ANG_W_DEF, ACC_W = 2 * D + M;
  localparam real PI = 3.141592653589793;
  localparam real ALPHA = 0.0012, GAIN = 1.0;
  localparam int  NSAMP = (1 << M) - 1, SETTLE = 12000, FR = 64;

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
    .clk, .rst_n, .start, .mode(MODE_FREQ_RESP), .sweep(SWEEP_LINEAR),
    .fr_start(FREQ_W'(FR)), .fr_step('0), .num_steps(8'd1), .n_samples(M'(NSAMP)),
    .settle(16'(SETTLE)), .phase_adj('0), .f1('0), .f2('0), .gain_spec('0),
    .im3_spec('0), .sample_en, .dac_o, .adc_i, .busy, .step_done, .sweep_done,
    .step_idx, .step_fr, .dc3, .dc4, .phase, .amp, .quadrant, .gain_valid,
    .gain_pass, .im3_valid, .im3_pass);

  dut_channel_model #(.D(D), .ALPHA(ALPHA), .GAIN(GAIN), .OFFSET(-3.0), .LAT(0)) chan (
    .clk, .sample_en, .c3(0.0), .dac_code(dac_o), .adc_code(adc_i));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real w, re, im, lag, g, want_amp, got_ph;
    int  clocks;
    w   = 2.0 * PI * FR / 65536.0;
    re  = 1.0 - (1.0 - ALPHA) * $cos(w);
    im  = (1.0 - ALPHA) * $sin(w);
    lag = (w + $atan2(im, re)) * 180.0 / PI;
    g   = GAIN * ALPHA / $sqrt(re * re + im * im);
    want_amp = 127.0 * 127.0 * g / 2.0 * real'(NSAMP);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    clocks = 1;
    while (!step_done) begin @(negedge clk); clocks++; end
    got_ph = real'(phase) * 360.0 / 65536.0;
    $display("N=%0d DC3=%0d DC4=%0d phase=%.2f deg (model %.2f) amp=%0d (model %.0f), %0d clocks",
             NSAMP, dc3, dc4, got_ph, lag, amp, want_amp, clocks);
    checks += 5;
    if (!(dc3 > 0 && dc4 > dc3)) begin failures++; $display("signs/order of DC3, DC4 wrong"); end
    if (got_ph - lag > 1.0 || lag - got_ph > 1.0) begin failures++; $display("phase off"); end
    if (real'(amp) > 1.03 * want_amp || real'(amp) < 0.97 * want_amp) begin
      failures++; $display("amplitude off");
    end
    if (clocks < SETTLE + NSAMP || clocks > SETTLE + NSAMP + 60) begin
      failures++; $display("measurement took %0d clocks", clocks);
    end
    if (quadrant != 2'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
