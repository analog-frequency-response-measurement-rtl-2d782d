// tb_dds_nco: self-checking test of the DDS phase accumulator.
// A reference model accumulates the same frequency words under a random
// clock enable; the truncated phase must match it every clock, clear must
// return the phase to zero, and a word of 2^(n-p) must step the truncated
// phase by exactly one per enabled clock (one table entry per sample).
module tb_dds_nco;
  localparam int unsigned FREQ_W = 16;
  localparam int unsigned P      = 10;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              clr = 1'b0;
  logic              ce = 1'b0;
  logic [FREQ_W-1:0] fr = '0;
  logic [P-1:0]      phase_o;
  logic [FREQ_W-1:0] model;
  int                checks = 0, failures = 0;

  dds_nco #(.FREQ_W(FREQ_W), .P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_phase();
    checks++;
    if (phase_o !== model[FREQ_W-1 -: P]) begin
      failures++;
      $display("mismatch: phase %0d expected %0d", phase_o, model[FREQ_W-1 -: P]);
    end
  endtask

  initial begin
    model = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // random words and enables
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check_phase();
      if (i % 500 == 0) fr = FREQ_W'($urandom);
      ce  = ($urandom % 4) != 0;
      clr = (i == 1700);
      @(posedge clk);
      #1;
      if (clr)     model = '0;
      else if (ce) model = model + fr;
    end
    // clear
    @(negedge clk); clr = 1'b1; ce = 1'b1; @(posedge clk); #1; model = '0;
    clr = 1'b0;
    @(negedge clk); check_phase();
    // one table step per sample
    fr = FREQ_W'(1) << (FREQ_W - P);
    ce = 1'b1;
    for (int i = 1; i <= 1100; i++) begin
      @(posedge clk); #1;
      checks++;
      if (phase_o !== P'(i)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
