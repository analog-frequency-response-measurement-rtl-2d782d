// tb_sincos_rom: self-checking test of the sin/cos look-up table.
// Every entry is compared with 2^(D-1) + round((2^(D-1)-1)*cos(2*pi*i/2^P))
// worked out in the testbench, the read latency is checked to be one clock,
// and the half-period symmetry u(i) + u(i + 2^(P-1)) = 2^D is checked.
module tb_sincos_rom;
  localparam int unsigned D = 8;
  localparam int unsigned P = 10;

  logic         clk = 1'b0;
  logic [P-1:0] addr = '0;
  logic [D-1:0] amp_o;
  int           checks = 0, failures = 0;
  int           tab [1 << P];

  sincos_rom #(.D(D), .P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v;
    for (int i = 0; i < (1 << P); i++) begin
      v = 127.0 * $cos(2.0 * 3.141592653589793 * i / 1024.0);
      tab[i] = 128 + ((v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5)));
    end
    // entries and latency: the output belongs to the previous address
    for (int i = 0; i < (1 << P); i++) begin
      @(negedge clk);
      addr = P'(i);
      @(posedge clk); #1;
      checks++;
      if (int'(amp_o) != tab[i]) begin
        failures++;
        $display("entry %0d: %0d expected %0d", i, amp_o, tab[i]);
      end
      @(negedge clk);
      addr = P'(i + 1);
      checks++;
      if (int'(amp_o) != tab[i]) failures++;   // not yet changed
    end
    // odd symmetry around mid-scale, read back through the port
    for (int i = 0; i < (1 << (P - 1)); i += 7) begin
      int a, b;
      @(negedge clk); addr = P'(i);
      @(posedge clk); #1; a = int'(amp_o);
      @(negedge clk); addr = P'(i + (1 << (P - 1)));
      @(posedge clk); #1; b = int'(amp_o);
      checks++;
      if (a + b != 256) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
