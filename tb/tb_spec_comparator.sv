// tb_spec_comparator: self-checking test of the pass/fail comparators.
// A gain comparator (lower limit) and an IM3 comparator (upper limit) see
// random positive and negative values around random limits, including the
// limit itself; the testbench's own comparison of |value| with the limit is
// the reference.  The result must hold between evaluations and clear on clr.
module tb_spec_comparator;
  localparam int unsigned ACC_W = 33;

  logic                    clk = 1'b0, rst_n = 1'b0, clr = 1'b0, eval = 1'b0;
  logic signed [ACC_W-1:0] value = '0;
  logic [ACC_W-1:0]        spec = '0;
  logic                    g_valid, g_pass, i_valid, i_pass;
  int                      checks = 0, failures = 0;

  spec_comparator #(.ACC_W(ACC_W), .LOWER_LIMIT(1'b1)) dut_gain (
    .clk, .rst_n, .clr, .eval, .value, .spec, .valid_o(g_valid), .pass_o(g_pass));
  spec_comparator #(.ACC_W(ACC_W), .LOWER_LIMIT(1'b0)) dut_im3 (
    .clk, .rst_n, .clr, .eval, .value, .spec, .valid_o(i_valid), .pass_o(i_pass));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v, s, m;
    bit     eg, ei;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (g_valid || i_valid) failures++;
    for (int i = 0; i < 2000; i++) begin
      s = longint'($urandom % 100000000);
      case (i % 4)
        0: v = s;
        1: v = -s;
        2: v = s + longint'($urandom % 1000) - 500;
        default: v = -(s + longint'($urandom % 1000) - 500);
      endcase
      m  = (v < 0) ? -v : v;
      eg = (m >= s);
      ei = (m <= s);
      @(negedge clk);
      value = ACC_W'(v); spec = ACC_W'(s); eval = 1'b1;
      @(negedge clk);
      eval = 1'b0; value = '0; spec = '1;     // must not change the result
      @(negedge clk);
      checks++;
      if (!g_valid || !i_valid || g_pass != eg || i_pass != ei) begin
        failures++;
        if (failures < 10) $display("v=%0d s=%0d gain %0d/%0d im3 %0d/%0d", v, s, g_pass, eg, i_pass, ei);
      end
    end
    @(negedge clk); clr = 1'b1;
    @(negedge clk); clr = 1'b0;
    checks++;
    if (g_valid || i_valid || g_pass || i_pass) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
