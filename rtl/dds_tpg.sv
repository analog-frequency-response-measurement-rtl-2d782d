// dds_tpg: DDS-based test pattern generator (TPG) of the BIST.
//
// Three phase accumulators feed three reads of the sin/cos table.
//
// Frequency-response mode: accumulator 1 runs at the frequency word fr.  The
// DAC receives the test tone cos(wt + phi_adj), where phi_adj (phase_adj, a
// binary angle of P bits) is added to the truncated phase word ahead of the
// table, and the analyzer receives the two quadrature references
// T1 = cos(wt) (ref_a_o) and T2 = sin(wt) (ref_b_o).  Setting phi_adj to the
// measured phase lag of the circuit brings the returned tone in phase with
// T1.  The sine is read at the cosine's address minus a quarter turn, i.e. by
// changing the two phase MSBs.  With phase_adj = 0 the DAC tone is T1.
//
// Linearity mode: accumulators 1, 2 and 3 run at f1, f2 and 2*f2 - f1.  The
// DAC receives (cos f1 + cos f2)/2 and the analyzer receives cos f2
// (ref_a_o, gain) and cos(2f2-f1) (ref_b_o, third-order intermodulation).
//
// All outputs are D-bit offset-binary codes (mid-scale 2^(D-1) = 0).
// Timing: phase accumulators advance on ce; the table has one register, so
// outputs follow the phase by one clock and stay mutually aligned.
// The tone plan follows the design description.  Halving the two-tone sum,
// computing 2*f2 - f1 from f1 and f2 rather than taking it as a word of its
// own, and applying phase_adj only in frequency-response mode are this
// design's own choices, and so is the sign of the phase adjustment: it
// advances the DAC tone, which is what puts the returned tone in phase with
// the reference.
module dds_tpg
  import bist_pkg::*;
#(
  parameter int unsigned D      = D_DEF,
  parameter int unsigned FREQ_W = FREQ_W_DEF,
  parameter int unsigned P      = P_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,        // reset all phases to 0
  input  logic              ce,         // sample strobe
  input  bist_mode_e        mode,
  input  logic [FREQ_W-1:0] fr,         // frequency-response tone word
  input  logic [P-1:0]      phase_adj,  // phase advance of the DAC tone
  input  logic [FREQ_W-1:0] f1,         // linearity tone 1
  input  logic [FREQ_W-1:0] f2,         // linearity tone 2
  output logic [D-1:0]      dac_o,      // tone to the DAC
  output logic [D-1:0]      ref_a_o,    // reference to multiplier A
  output logic [D-1:0]      ref_b_o     // reference to multiplier B
);
  localparam logic [P-1:0] QUARTER = P'(1) << (P - 2);

  logic [FREQ_W-1:0] fw1, fw3;
  logic [P-1:0]      ph1, ph2, ph3;
  logic [P-1:0]      addr_d, addr_a, addr_b;
  logic [D-1:0]      amp_d, amp_a, amp_b;
  logic [D:0]        two_tone;
  bist_mode_e        mode_q;

  assign fw1 = (mode == MODE_LINEARITY) ? f1 : fr;
  assign fw3 = (f2 << 1) - f1;

  dds_nco #(.FREQ_W(FREQ_W), .P(P)) u_nco1 (
    .clk, .rst_n, .clr, .ce, .fr(fw1), .phase_o(ph1));
  dds_nco #(.FREQ_W(FREQ_W), .P(P)) u_nco2 (
    .clk, .rst_n, .clr, .ce, .fr(f2),  .phase_o(ph2));
  dds_nco #(.FREQ_W(FREQ_W), .P(P)) u_nco3 (
    .clk, .rst_n, .clr, .ce, .fr(fw3), .phase_o(ph3));

  always_comb begin
    if (mode == MODE_LINEARITY) begin
      addr_d = ph1;                 // ROM1: f1
      addr_a = ph2;                 // ROM2: f2
      addr_b = ph3;                 // ROM3: 2f2 - f1
    end else begin
      addr_d = ph1 + phase_adj;     // test tone cos(wt + phi_adj)
      addr_a = ph1;                 // T1 = cos(wt)
      addr_b = ph1 - QUARTER;       // T2 = sin(wt) = cos(wt - 90 deg)
    end
  end

  sincos_rom #(.D(D), .P(P)) u_rom_d (.clk, .addr(addr_d), .amp_o(amp_d));
  sincos_rom #(.D(D), .P(P)) u_rom_a (.clk, .addr(addr_a), .amp_o(amp_a));
  sincos_rom #(.D(D), .P(P)) u_rom_b (.clk, .addr(addr_b), .amp_o(amp_b));

  // Mode as seen by the table outputs (one clock behind the addresses).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mode_q <= MODE_FREQ_RESP;
    else        mode_q <= mode;
  end

  assign two_tone = {1'b0, amp_d} + {1'b0, amp_a};
  assign dac_o    = (mode_q == MODE_LINEARITY) ? two_tone[D:1] : amp_d;
  assign ref_a_o  = amp_a;
  assign ref_b_o  = amp_b;

  initial begin
    assert (P >= 3) else $error("dds_tpg: P must be at least 3");
  end
endmodule
