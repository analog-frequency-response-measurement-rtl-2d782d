// tb_freq_analyzer: self-checking test of the phase/amplitude analyzer.
// DC3 = R*cos(phi) and DC4 = R*sin(phi) are formed in the testbench for
// angles all around the circle (including 135 and 79 degrees) and random
// amplitudes.  With the near-45-degree adjustment on, the phase must be
// within 0.3 degree; the amplitude sqrt(DC3^2+DC4^2) within 1 LSB; the
// quadrant must match; and done must come max(ANG_W+3, ACC_W+2) clocks
// after start.  A second instance without the adjustment (phase taken as
// the ratio itself) is checked at small angles, where it must be within
// 0.1 degree of the true phase.
module tb_freq_analyzer;
  localparam int unsigned ACC_W = 33, ANG_W = 16;
  localparam int unsigned LAT   = (ANG_W + 3 > ACC_W + 2) ? ANG_W + 3 : ACC_W + 2;
  localparam real         PI    = 3.141592653589793;

  logic                    clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [ACC_W-1:0] dc3 = '0, dc4 = '0;
  logic                    busy, done, busy0, done0;
  logic [ANG_W-1:0]        phase_o, phase0;
  logic [ACC_W-1:0]        amp_o, amp0;
  logic [1:0]              quadrant_o, quad0;
  int                      checks = 0, failures = 0;

  freq_analyzer #(.ACC_W(ACC_W), .ANG_W(ANG_W), .ADJUST(1'b1)) dut (.*);
  freq_analyzer #(.ACC_W(ACC_W), .ANG_W(ANG_W), .ADJUST(1'b0)) dut_plain (
    .clk, .rst_n, .start, .dc3, .dc4, .busy(busy0), .done(done0),
    .phase_o(phase0), .amp_o(amp0), .quadrant_o(quad0));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real wrap180(real d);
    while (d > 180.0)   d -= 360.0;
    while (d <= -180.0) d += 360.0;
    return d;
  endfunction

  task automatic measure(real deg, real r, real tol_deg, bit plain);
    longint c, s;
    int     cyc;
    real    got, err, mag;
    c = longint'($rtoi(r * $cos(deg * PI / 180.0)));
    s = longint'($rtoi(r * $sin(deg * PI / 180.0)));
    @(negedge clk);
    dc3 = ACC_W'(c); dc4 = ACC_W'(s); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    got = plain ? real'(phase0) : real'(phase_o);
    got = got * 360.0 / 65536.0;
    err = wrap180(got - deg);
    checks++;
    if (err > tol_deg || err < -tol_deg) begin
      failures++;
      $display("phase %f deg: got %f (plain=%0d)", deg, got, plain);
    end
    mag = $sqrt(real'(c) * real'(c) + real'(s) * real'(s));
    checks++;
    if (real'(amp_o) > mag + 1.0 || real'(amp_o) < mag - 1.0) begin
      failures++;
      $display("amplitude: got %0d expected %f", amp_o, mag);
    end
    checks++;
    if (!plain && quadrant_o != 2'(int'($floor(wrap180(deg) < 0.0 ? (wrap180(deg) + 360.0) / 90.0
                                                             : wrap180(deg) / 90.0)) % 4)) begin
      failures++;
      $display("quadrant %0d for %f deg", quadrant_o, deg);
    end
    checks++;
    if (cyc != LAT) begin
      failures++;
      $display("latency %0d expected %0d", cyc, LAT);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    measure(135.0, 2.0e9, 0.3, 0);
    measure(79.0, 3.0e8, 0.3, 0);
    measure(-45.0, 5.0e6, 0.3, 0);
    measure(200.0, 1.0e6, 0.3, 0);
    for (int i = 0; i < 300; i++) begin
      real deg, r;
      deg = real'($urandom % 36000) / 100.0 + 0.37;
      r   = 1.0e5 + real'($urandom % 1000000000);
      measure(deg, r, 0.3, 0);
    end
    // plain ratio: good for small angles only
    for (int i = 1; i <= 20; i++) measure(real'(i) * 0.25, 1.0e9, 0.1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
