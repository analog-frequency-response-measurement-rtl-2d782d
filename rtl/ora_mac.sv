// ora_mac: one multiplier/accumulator of the output response analyzer (ORA).
//
// Multiplies each returned ADC sample by a DDS reference tone and adds the
// products up, so that after N samples the accumulator holds about
// (A*A1/2)*cos(dphi)*N: the DC term of the product, while the tone at twice
// the test frequency and the circuit's DC offset average out.
//
// How it works: the reference arrives as an offset-binary code u.  It is
// turned into sign-magnitude form (sign = u < 2^(D-1), magnitude =
// |u - 2^(D-1)|), which removes the DDS output's DC offset.  The magnitude is
// multiplied by the unsigned ADC code, and the sign bit decides whether the
// product enters the adder as it is or in two's complement, so the adder of
// the accumulator also does the subtraction.  The accumulator is 2D+M bits
// wide, enough for fewer than 2^M samples.
//
// Interface: en marks a sample to be accumulated (ref and adc are read in
// that clock); clr empties the pipeline and the accumulator.
// Timing: two register stages; the product of a sample is in acc_o two
// clocks after its en.
// Sign-magnitude reference, sign-controlled two's complement and the 2D+M
// accumulator follow the design description; the pipeline register between
// multiplier and adder is this design's own choice.
module ora_mac #(
  parameter int unsigned D     = bist_pkg::D_DEF,
  parameter int unsigned M     = bist_pkg::M_DEF,
  parameter int unsigned ACC_W = 2 * D + M
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    en,
  input  logic [D-1:0]            ref_i,  // DDS reference, offset binary
  input  logic [D-1:0]            adc_i,  // ADC sample, unsigned code
  output logic signed [ACC_W-1:0] acc_o   // accumulated DC value
);
  localparam logic [D-1:0] MID = D'(1) << (D - 1);

  logic           ref_neg;
  logic [D-1:0]   ref_mag;
  logic [2*D-1:0] prod_q;
  logic           neg_q, vld_q;
  logic [ACC_W-1:0] addend;

  // Offset binary to sign-magnitude.
  always_comb begin
    ref_neg = (ref_i < MID);
    ref_mag = ref_neg ? (MID - ref_i) : (ref_i - MID);
  end

  // Stage 1: magnitude multiplier.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q <= '0;
      neg_q  <= 1'b0;
      vld_q  <= 1'b0;
    end else if (clr) begin
      prod_q <= '0;
      neg_q  <= 1'b0;
      vld_q  <= 1'b0;
    end else begin
      prod_q <= ref_mag * adc_i;
      neg_q  <= ref_neg;
      vld_q  <= en;
    end
  end

  // Stage 2: sign bit selects the two's complement of the product.
  assign addend = neg_q ? (~ACC_W'(prod_q) + ACC_W'(1)) : ACC_W'(prod_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      acc_o <= '0;
    else if (clr)    acc_o <= '0;
    else if (vld_q)  acc_o <= acc_o + signed'(addend);
  end

  initial begin
    assert (ACC_W >= 2 * D) else $error("ora_mac: accumulator narrower than a product");
  end
endmodule
