// tb_dds_tpg: self-checking test of the DDS test pattern generator.
// The testbench keeps its own three phase accumulators and its own cosine
// table and predicts, one clock ahead, the DAC tone and both references:
//  * frequency-response mode: dac = cos(ph + adj), ref_a = cos(ph),
//    ref_b = sin(ph) (the cosine a quarter turn earlier);
//  * linearity mode: dac = (cos f1 + cos f2)/2, ref_a = cos f2,
//    ref_b = cos(2*f2 - f1).
// It also checks that ref_a and ref_b are 90 degrees apart: ref_b equals
// ref_a as it was a quarter period of samples earlier.
module tb_dds_tpg;
  import bist_pkg::*;
  localparam int unsigned D = 8, FREQ_W = 16, P = 10;

  logic              clk = 1'b0, rst_n = 1'b0, clr = 1'b0, ce = 1'b0;
  bist_mode_e        mode = MODE_FREQ_RESP;
  logic [FREQ_W-1:0] fr = '0, f1 = '0, f2 = '0;
  logic [P-1:0]      phase_adj = '0;
  logic [D-1:0]      dac_o, ref_a_o, ref_b_o;
  int                checks = 0, failures = 0;
  int                tab [1 << P];
  logic [FREQ_W-1:0] m1, m2, m3;
  int                e_dac, e_a, e_b;
  int                hist_a [$];

  dds_tpg #(.D(D), .FREQ_W(FREQ_W), .P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lut(logic [FREQ_W-1:0] ph, int off);
    return tab[(int'(ph[FREQ_W-1 -: P]) + off) & ((1 << P) - 1)];
  endfunction

  // expected outputs for the phases held now (appear after the next edge)
  task automatic predict();
    if (mode == MODE_LINEARITY) begin
      e_dac = (lut(m1, 0) + lut(m2, 0)) / 2;
      e_a   = lut(m2, 0);
      e_b   = lut(m3, 0);
    end else begin
      e_dac = lut(m1, int'(phase_adj));
      e_a   = lut(m1, 0);
      e_b   = lut(m1, -(1 << (P - 2)));
    end
  endtask

  task automatic run(int cycles);
    for (int i = 0; i < cycles; i++) begin
      @(negedge clk);
      ce = ($urandom % 3) != 0;
      predict();
      @(posedge clk); #1;
      if (clr) begin m1 = '0; m2 = '0; m3 = '0; end
      else if (ce) begin
        m1 = m1 + ((mode == MODE_LINEARITY) ? f1 : fr);
        m2 = m2 + f2;
        m3 = m3 + FREQ_W'(2 * f2 - f1);
      end
      checks++;
      if (int'(dac_o) != e_dac || int'(ref_a_o) != e_a || int'(ref_b_o) != e_b) begin
        failures++;
        if (failures < 10)
          $display("t=%0t mode=%0d dac %0d/%0d a %0d/%0d b %0d/%0d", $time, mode,
                   dac_o, e_dac, ref_a_o, e_a, ref_b_o, e_b);
      end
    end
  endtask

  initial begin
    real v;
    for (int i = 0; i < (1 << P); i++) begin
      v = 127.0 * $cos(2.0 * 3.141592653589793 * i / 1024.0);
      tab[i] = 128 + ((v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5)));
    end
    m1 = '0; m2 = '0; m3 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // frequency response, no phase adjustment
    fr = 16'd1234;
    run(2000);
    // with a phase adjustment of 79 degrees (225 of 1024)
    phase_adj = 10'd225;
    run(2000);
    // quadrature: with one table step per sample, sin lags cos by 256 samples
    clr = 1'b1; phase_adj = '0; fr = 16'd64;
    run(1);
    clr = 1'b0;
    for (int i = 0; i < 1200; i++) begin
      @(negedge clk); ce = 1'b1;
      @(posedge clk); #1;
      m1 = m1 + fr; m2 = m2 + f2; m3 = m3 + FREQ_W'(2 * f2 - f1);
      hist_a.push_back(int'(ref_a_o));
      if (hist_a.size() > 256) begin
        checks++;
        if (int'(ref_b_o) != hist_a[hist_a.size() - 257]) failures++;
      end
    end
    // linearity mode
    mode = MODE_LINEARITY;
    f1 = 16'd3000; f2 = 16'd3500;
    clr = 1'b1; run(1); clr = 1'b0;
    run(3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
