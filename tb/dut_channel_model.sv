// dut_channel_model: behavioural model of DAC, analog circuit under test and
// ADC, for simulation only (not synthesizable).
//
// On each sample strobe the DAC code is taken as a signed amplitude
// x = code - 2^(D-1), optionally distorted by a cubic term
// x + c3 * x^3 / (2^(D-1)-1)^2 (an amplifier's third-order nonlinearity),
// filtered by a first-order low pass y += ALPHA * (x - y) (an RC stage
// sampled at the converter rate), scaled by GAIN, shifted by a DC offset
// OFFSET (in ADC codes) and quantised to an unsigned D-bit ADC code.  LAT
// further samples of delay stand for converter and board latency.
// The ADC code seen after strobe k therefore belongs to the DAC codes up to
// strobe k-1: the transfer function is
//   H(z) = GAIN * ALPHA * z^-(1+LAT) / (1 - (1-ALPHA) z^-1).
module dut_channel_model #(
  parameter int unsigned D      = 8,
  parameter real         ALPHA  = 0.125,
  parameter real         GAIN   = 0.9,
  parameter real         OFFSET = 6.0,
  parameter int unsigned LAT    = 2
) (
  input  logic         clk,
  input  logic         sample_en,
  input  real          c3,        // cubic distortion coefficient
  input  logic [D-1:0] dac_code,
  output logic [D-1:0] adc_code
);
  localparam real FS  = real'((1 << (D - 1)) - 1);
  localparam int  MID = 1 << (D - 1);

  real y = 0.0;
  int  line [$];

  function automatic int quantise(real v);
    int c;
    c = MID + int'($floor(OFFSET + GAIN * v + 0.5));
    if (c < 0) c = 0;
    if (c > (1 << D) - 1) c = (1 << D) - 1;
    return c;
  endfunction

  initial adc_code = D'(MID);

  always @(posedge clk) begin
    real x;
    if (sample_en) begin
      x = real'(int'(dac_code) - MID);
      x = x + c3 * x * x * x / (FS * FS);
      y = y + ALPHA * (x - y);
      line.push_back(quantise(y));
      if (line.size() > LAT) adc_code <= D'(line.pop_front());
    end
  end
endmodule
