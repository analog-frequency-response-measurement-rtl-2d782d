// tb_bist_controller: self-checking test of the sweep controller.
// The analyzer is emulated (done 20 clocks after start) and samples arrive
// on every third clock.  For each step the testbench counts the samples
// skipped after the accumulator clear (must equal settle), the accumulation
// enables (must equal n_samples), and checks the frequency word of the step
// (linear: fr_start + k*fr_step, octave: fr_start * 2^k), the step index,
// one analyzer start per step in frequency-response mode and none in
// linearity mode, the phase clear once per sweep, and one sweep_done.
module tb_bist_controller;
  import bist_pkg::*;
  localparam int unsigned FREQ_W = 16, M = 17, STEP_W = 8, SETTLE_W = 16;

  logic                clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  bist_mode_e          mode = MODE_FREQ_RESP;
  sweep_e              sweep = SWEEP_LINEAR;
  logic [FREQ_W-1:0]   fr_start = '0, fr_step = '0;
  logic [STEP_W-1:0]   num_steps = '0;
  logic [M-1:0]        n_samples = '0;
  logic [SETTLE_W-1:0] settle = '0;
  logic                sample_en = 1'b0;
  bist_mode_e          mode_o;
  logic [FREQ_W-1:0]   fr_o;
  logic                tpg_clr, acc_clr, acc_en, ana_start, ana_done = 1'b0;
  logic                busy, step_done, sweep_done;
  logic [STEP_W-1:0]   step_idx;
  int                  checks = 0, failures = 0;

  // per-step observations
  int n_acc, n_settle, n_ana, n_tpgclr, n_steps_seen, n_sweep_done;
  bit in_settle;
  int ana_cnt;

  bist_controller #(.FREQ_W(FREQ_W), .M(M), .STEP_W(STEP_W), .SETTLE_W(SETTLE_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // samples on every third clock
  int div = 0;
  always_ff @(posedge clk) begin
    div       <= (div == 2) ? 0 : div + 1;
    sample_en <= (div == 2);
  end

  // analyzer emulation
  always_ff @(posedge clk) begin
    ana_done <= 1'b0;
    if (ana_start) ana_cnt <= 20;
    else if (ana_cnt > 0) begin
      ana_cnt <= ana_cnt - 1;
      if (ana_cnt == 1) ana_done <= 1'b1;
    end
  end

  // monitor
  always @(posedge clk) if (rst_n) begin
    if (acc_clr) begin n_acc = 0; n_settle = 0; in_settle = 1; end
    if (acc_en) begin n_acc++; in_settle = 0; end
    else if (sample_en && in_settle && busy && !acc_clr) n_settle++;
    if (ana_start) n_ana++;
    if (tpg_clr) n_tpgclr++;
    if (sweep_done) n_sweep_done++;
  end

  task automatic run_sweep(bist_mode_e md, sweep_e sw, int f0, int fs, int ns,
                           int nsamp, int st);
    int exp_steps, fr_exp;
    n_ana = 0; n_tpgclr = 0; n_sweep_done = 0; n_steps_seen = 0;
    exp_steps = (md == MODE_LINEARITY) ? 1 : ns;
    @(negedge clk);
    mode = md; sweep = sw; fr_start = FREQ_W'(f0); fr_step = FREQ_W'(fs);
    num_steps = STEP_W'(ns); n_samples = M'(nsamp); settle = SETTLE_W'(st);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    fr_exp = f0;
    while (busy) begin
      @(posedge clk); #1;
      if (step_done) begin
        checks += 4;
        if (int'(step_idx) != n_steps_seen) failures++;
        if (int'(fr_o) != (fr_exp & 16'hffff)) begin
          failures++; $display("step %0d fr %0d expected %0d", step_idx, fr_o, fr_exp);
        end
        if (n_acc != nsamp) begin
          failures++; $display("step %0d: %0d samples accumulated, expected %0d", step_idx, n_acc, nsamp);
        end
        if (n_settle != st) begin
          failures++; $display("step %0d: settled %0d samples, expected %0d", step_idx, n_settle, st);
        end
        n_steps_seen++;
        fr_exp = (sw == SWEEP_OCTAVE) ? fr_exp * 2 : fr_exp + fs;
      end
    end
    checks += 4;
    if (n_steps_seen != exp_steps) begin failures++; $display("steps %0d expected %0d", n_steps_seen, exp_steps); end
    if (n_ana != ((md == MODE_LINEARITY) ? 0 : exp_steps)) failures++;
    if (n_tpgclr != 1) failures++;
    if (n_sweep_done != 1) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_sweep(MODE_FREQ_RESP, SWEEP_LINEAR, 100, 250, 5, 300, 17);
    run_sweep(MODE_FREQ_RESP, SWEEP_OCTAVE, 64, 0, 6, 128, 0);
    run_sweep(MODE_LINEARITY, SWEEP_LINEAR, 0, 0, 9, 1000, 40);
    run_sweep(MODE_FREQ_RESP, SWEEP_LINEAR, 1000, 1, 1, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
