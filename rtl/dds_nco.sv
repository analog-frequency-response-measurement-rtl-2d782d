// dds_nco: phase accumulator of the direct digital synthesizer.
//
// On every sample strobe (ce) the n-bit phase register adds the frequency
// word fr, so the output tone has frequency f_sample * fr / 2^n.  The p most
// significant bits of the phase are handed on to the look-up table (phase
// truncation), as in the classic DDS structure.  clr returns the phase to 0
// so that a measurement can start at a known phase.
//
// Interface: fr (n bits) is sampled on each ce; phase_o is the registered
// truncated phase, valid one clock after the ce that produced it.
// Structure (adder + Z^-1 + truncation) follows the design description; the
// synchronous clear and the clock enable are this design's own choices.
module dds_nco #(
  parameter int unsigned FREQ_W = bist_pkg::FREQ_W_DEF,  // n
  parameter int unsigned P      = bist_pkg::P_DEF        // p
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,      // synchronous phase reset
  input  logic              ce,       // sample strobe
  input  logic [FREQ_W-1:0] fr,       // frequency word
  output logic [P-1:0]      phase_o   // truncated phase word
);
  logic [FREQ_W-1:0] acc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      acc_q <= '0;
    else if (clr)    acc_q <= '0;
    else if (ce)     acc_q <= acc_q + fr;
  end

  assign phase_o = acc_q[FREQ_W-1 -: P];

  initial begin
    assert (P <= FREQ_W) else $error("dds_nco: P must not exceed FREQ_W");
  end
endmodule
