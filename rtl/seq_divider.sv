// seq_divider: sequential fractional divider, q = num / den for num <= den.
//
// Restoring division, one quotient bit per clock, most significant first.
// The quotient has one integer bit and F fraction bits (unsigned Q1.F), so
// num = den gives exactly 1.0 = 2^F.  den = 0 gives q = 0.
//
// Interface: start (one clock) latches num and den; done pulses one clock
// with q valid from then on until the next start.  Latency: F + 2 clocks
// from start to done.  A start while busy restarts the division.
// Helper of the phase analyzer; its structure is this design's own choice.
module seq_divider #(
  parameter int unsigned WIDTH = 33,
  parameter int unsigned F     = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] num,
  input  logic [WIDTH-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [F:0]       q
);
  localparam int unsigned CW = $clog2(F + 2);

  logic [WIDTH:0]   rem_q;
  logic [WIDTH-1:0] den_q;
  logic [CW-1:0]    cnt_q;
  logic [WIDTH:0]   diff;
  logic             ge;

  assign diff = rem_q - {1'b0, den_q};
  assign ge   = (rem_q >= {1'b0, den_q}) && (den_q != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q <= '0;
      den_q <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      q     <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rem_q <= {1'b0, num};
        den_q <= den;
        cnt_q <= CW'(F);
        busy  <= 1'b1;
        q     <= '0;
      end else if (busy) begin
        q     <= {q[F-1:0], ge};
        rem_q <= (ge ? diff : rem_q) << 1;
        if (cnt_q == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          cnt_q <= cnt_q - CW'(1);
        end
      end
    end
  end
endmodule
