// spec_comparator: pass/fail check of an accumulated value against a limit.
//
// In the two-tone linearity test one accumulator measures the response at
// the fundamental (gain) and one at the third-order intermodulation product
// (IM3).  Each is compared with a specification value to give a pass/fail
// result.  The magnitude |value| is compared, since the sign of the
// accumulated value only reflects the phase of the response.
//   LOWER_LIMIT = 1 (gain): pass when |value| >= spec.
//   LOWER_LIMIT = 0 (IM3):  pass when |value| <= spec.
//
// Interface: eval (one clock) samples value and spec; pass_o and valid_o
// are registered and hold until clr or the next eval.
// The comparator against a specification follows the design description;
// comparing the magnitude, the direction of each limit and the strobe are
// this design's own choices.
module spec_comparator #(
  parameter int unsigned ACC_W       = 2 * bist_pkg::D_DEF + bist_pkg::M_DEF,
  parameter bit          LOWER_LIMIT = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    eval,
  input  logic signed [ACC_W-1:0] value,
  input  logic [ACC_W-1:0]        spec,
  output logic                    valid_o,
  output logic                    pass_o
);
  logic [ACC_W-1:0] mag;
  logic             pass_c;

  assign mag    = value[ACC_W-1] ? ACC_W'(-value) : ACC_W'(value);
  assign pass_c = LOWER_LIMIT ? (mag >= spec) : (mag <= spec);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      pass_o  <= 1'b0;
    end else if (clr) begin
      valid_o <= 1'b0;
      pass_o  <= 1'b0;
    end else if (eval) begin
      valid_o <= 1'b1;
      pass_o  <= pass_c;
    end
  end
endmodule
