// tb_ora_mac: self-checking test of the multiplier/accumulator.
// 1) Random references, samples and enables: the accumulator must equal the
//    testbench's sum of (ref - 2^(D-1)) * adc, two clocks after each sample.
// 2) A correlation: reference cos(wt), sample 128 + k + A1*cos(wt - dphi)
//    over a whole number of periods must give (127*A1/2)*N*cos(dphi) within
//    the rounding of the 8-bit codes, with the DC offset k cancelled.
// 3) clr empties the accumulator.
module tb_ora_mac;
  localparam int unsigned D = 8, M = 17, ACC_W = 2 * D + M;

  logic                    clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [D-1:0]            ref_i = 8'd128, adc_i = 8'd0;
  logic signed [ACC_W-1:0] acc_o;
  int                      checks = 0, failures = 0;
  longint                  model, pipe0;
  logic                    v0;

  ora_mac #(.D(D), .M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real    pi, expect_dc, dphi;
    int     n;
    pi = 3.141592653589793;
    model = 0; v0 = 0; pipe0 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // 1) random
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      checks++;
      if (acc_o != ACC_W'(model)) begin
        failures++;
        if (failures < 10) $display("acc %0d expected %0d", acc_o, model);
      end
      ref_i = D'($urandom); adc_i = D'($urandom); en = ($urandom % 4) != 0;
      @(posedge clk); #1;
      // stage 2 adds the product registered by stage 1 one clock earlier
      if (v0) model += pipe0;
      v0 = en; pipe0 = longint'(int'(ref_i) - 128) * longint'(adc_i);
    end
    // 3) clear
    @(negedge clk); en = 1'b0; clr = 1'b1;
    @(negedge clk); clr = 1'b0;
    @(negedge clk);
    checks++;
    if (acc_o != 0) failures++;
    // 2) correlation, 64 samples per period, 1024 periods
    dphi = 79.0 * pi / 180.0;
    n = 65536;
    for (int i = 0; i < n; i++) begin
      real r, s;
      @(negedge clk);
      r = 127.0 * $cos(2.0 * pi * i / 64.0);
      s = 128.0 + 5.0 + 100.0 * $cos(2.0 * pi * i / 64.0 - dphi);
      ref_i = D'(128 + int'($floor(r + 0.5)));
      adc_i = D'(int'($floor(s + 0.5)));
      en = 1'b1;
    end
    @(negedge clk); en = 1'b0;
    repeat (3) @(negedge clk);
    expect_dc = 127.0 * 100.0 / 2.0 * n * $cos(dphi);
    checks++;
    if (real'(acc_o) - expect_dc > 0.01 * 127.0 * 100.0 / 2.0 * n ||
        expect_dc - real'(acc_o) > 0.01 * 127.0 * 100.0 / 2.0 * n) begin
      failures++;
      $display("correlation %0d expected %f", acc_o, expect_dc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
