// sincos_rom: phase-to-amplitude look-up table of the DDS.
//
// Holds one full period of a cosine, 2^P entries of D bits, in offset-binary
// form (the code a DAC takes): entry i = 2^(D-1) + round((2^(D-1)-1) *
// cos(2*pi*i/2^P)).  A sine, or any of the four quadrature phases, is read
// from the same table by adding a multiple of 2^(P-2) to the address, which is
// how the generator derives cos and sin from one phase word.
// The table is computed at elaboration from the formula above, so no data
// file is needed.
//
// Timing: synchronous read, amp_o holds the entry for the address presented
// one clock earlier (a block-ROM style output register).
// The table contents and the read latency are this design's own choices; the
// design description only calls the block a sin/cos ROM of D-bit words.
module sincos_rom #(
  parameter int unsigned D = bist_pkg::D_DEF,  // amplitude word length
  parameter int unsigned P = bist_pkg::P_DEF   // address (phase) width
) (
  input  logic         clk,
  input  logic [P-1:0] addr,
  output logic [D-1:0] amp_o
);
  localparam int unsigned DEPTH = 1 << P;

  typedef logic [D-1:0] table_t [DEPTH];

  function automatic table_t make_table();
    table_t t;
    real    a;
    real    v;
    int     r;
    a = real'((1 << (D - 1)) - 1);
    for (int i = 0; i < DEPTH; i++) begin
      v = a * $cos(2.0 * 3.14159265358979323846 * real'(i) / real'(DEPTH));
      r = (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(0.5 - v);
      t[i] = D'((1 << (D - 1)) + r);
    end
    return t;
  endfunction

  localparam table_t ROM = make_table();

  always_ff @(posedge clk) amp_o <= ROM[addr];
endmodule
