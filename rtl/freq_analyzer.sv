// freq_analyzer: phase delay and phase-corrected amplitude from DC3 and DC4.
//
// After an accumulation of N samples the two accumulators hold
//   DC3 ~ (A*A1/2)*N*cos(dphi)   and   DC4 ~ (A*A1/2)*N*sin(dphi).
// The analyzer turns the pair into the phase delay dphi of the circuit under
// test and into the amplitude (A*A1/2)*N that DC3 and DC4 would show if the
// test tone were in phase with the reference, DC3/cos(dphi) = DC4/sin(dphi).
//
// Phase, without an arctangent table:
//  * the quadrant comes from the sign bits of DC3 and DC4;
//  * inside the quadrant, x = min(|DC3|,|DC4|) / max(|DC3|,|DC4|) is formed by
//    a sequential divider; for |DC4| <= |DC3| the angle is atan(x), otherwise
//    it is 90 deg - atan(x);
//  * atan(x) is approximated by x itself when ADJUST = 0, which is good for
//    small x, and by x*(pi/4 + 0.273*(1 - x)) when ADJUST = 1, which stays
//    within about 0.25 deg up to x = 1.
// The phase is a binary angle: phase_o / 2^ANG_W of a full turn, 0..360 deg,
// measured as the lag of the returned signal behind the reference cos(wt).
// Its top bits can be fed straight back as the DDS phase adjustment.
//
// Amplitude: amp_o = sqrt(DC3^2 + DC4^2), computed by a sequential square
// root.  This equals DC3/cos(dphi) and DC4/sin(dphi) without dividing by a
// cosine.
//
// Interface: start (one clock) samples dc3/dc4; done pulses when phase_o,
// amp_o and quadrant_o are valid; they hold until the next start.
// Latency: max(ANG_W + 3, ACC_W + 2) clocks from start to done.
// Quadrant from the signs, the ratio as the angle for small ratios and
// 90 deg minus the inverse ratio for large ones follow the design
// description.  The correction near x = 1 (ADJUST = 1, the default), the
// square-root amplitude and the number formats are this design's own choices.
module freq_analyzer #(
  parameter int unsigned ACC_W  = 2 * bist_pkg::D_DEF + bist_pkg::M_DEF,
  parameter int unsigned ANG_W  = bist_pkg::ANG_W_DEF,
  parameter bit          ADJUST = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [ACC_W-1:0] dc3,
  input  logic signed [ACC_W-1:0] dc4,
  output logic                    busy,
  output logic                    done,
  output logic [ANG_W-1:0]        phase_o,     // binary angle of dphi
  output logic [ACC_W-1:0]        amp_o,       // (A*A1/2)*N
  output logic [1:0]              quadrant_o   // 0: 0-90, 1: 90-180, ...
);
  localparam int unsigned F  = ANG_W;       // fraction bits of the ratio
  localparam int unsigned CF = 16;          // fraction bits of constants
  localparam real         PI = 3.14159265358979323846;
  // 2^ANG_W / (2*pi) and 0.273 * 2^ANG_W / (2*pi), scaled by 2^CF.
  localparam longint unsigned C_RAD = longint'($rtoi(2.0 ** ANG_W / (2.0 * PI) * 2.0 ** CF + 0.5));
  localparam longint unsigned C_ADJ = longint'($rtoi(0.273 * 2.0 ** ANG_W / (2.0 * PI) * 2.0 ** CF + 0.5));
  localparam int unsigned     PW    = 2 * F + ANG_W + CF + 4;

  logic [ACC_W-1:0]   mag3, mag4;
  logic [2*ACC_W-1:0] sumsq;
  logic               neg3_q, neg4_q, swap_q;
  logic               div_busy, div_done, sq_busy, sq_done;
  logic               div_fin_q, sq_fin_q;
  logic [F:0]         ratio;
  logic [ACC_W-1:0]   root;
  logic [PW-1:0]      x, one_minus_x, t_lin, t_adj;
  logic [ANG_W-1:0]   a_oct, a_quad, phase_c;

  assign mag3  = dc3[ACC_W-1] ? ACC_W'(-dc3) : ACC_W'(dc3);
  assign mag4  = dc4[ACC_W-1] ? ACC_W'(-dc4) : ACC_W'(dc4);
  assign sumsq = mag3 * mag3 + mag4 * mag4;

  seq_divider #(.WIDTH(ACC_W), .F(F)) u_div (
    .clk, .rst_n, .start,
    .num ((mag4 > mag3) ? mag3 : mag4),
    .den ((mag4 > mag3) ? mag4 : mag3),
    .busy(div_busy), .done(div_done), .q(ratio));

  int_sqrt #(.K(ACC_W)) u_sqrt (
    .clk, .rst_n, .start, .x(sumsq),
    .busy(sq_busy), .done(sq_done), .root);

  // atan of the ratio, as a binary angle within one octant.
  always_comb begin
    x           = PW'(ratio);
    one_minus_x = (PW'(1) << F) - x;
    if (ADJUST) begin
      t_lin = (x << (ANG_W - 3)) >> F;                    // x * 45 deg
      t_adj = (x * one_minus_x * PW'(C_ADJ)) >> (2 * F + CF);
    end else begin
      t_lin = (x * PW'(C_RAD)) >> (F + CF);               // x rad
      t_adj = '0;
    end
    a_oct  = ANG_W'(t_lin + t_adj);
    a_quad = swap_q ? ANG_W'((1 << (ANG_W - 2)) - a_oct) : a_oct;
    unique case ({neg3_q, neg4_q})
      2'b00:   phase_c = a_quad;                                  // Q1
      2'b10:   phase_c = ANG_W'((1 << (ANG_W - 1)) - a_quad);     // Q2
      2'b11:   phase_c = ANG_W'((1 << (ANG_W - 1)) + a_quad);     // Q3
      default: phase_c = ANG_W'(-a_quad);                         // Q4
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      neg3_q     <= 1'b0;
      neg4_q     <= 1'b0;
      swap_q     <= 1'b0;
      div_fin_q  <= 1'b0;
      sq_fin_q   <= 1'b0;
      busy       <= 1'b0;
      done       <= 1'b0;
      phase_o    <= '0;
      amp_o      <= '0;
      quadrant_o <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        neg3_q    <= dc3[ACC_W-1];
        neg4_q    <= dc4[ACC_W-1];
        swap_q    <= (mag4 > mag3);
        div_fin_q <= 1'b0;
        sq_fin_q  <= 1'b0;
        busy      <= 1'b1;
      end else if (busy) begin
        if (div_done) div_fin_q <= 1'b1;
        if (sq_done)  sq_fin_q  <= 1'b1;
        if ((div_fin_q || div_done) && (sq_fin_q || sq_done)) begin
          busy       <= 1'b0;
          done       <= 1'b1;
          phase_o    <= phase_c;
          amp_o      <= root;
          quadrant_o <= phase_c[ANG_W-1 -: 2];
        end
      end
    end
  end

  initial begin
    assert (ANG_W >= 4 && ANG_W <= 24) else $error("freq_analyzer: ANG_W out of range");
  end
endmodule
