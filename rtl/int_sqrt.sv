// int_sqrt: sequential integer square root, root = floor(sqrt(x)).
//
// Digit-by-digit (binary) method: each clock brings down two radicand bits,
// compares the partial remainder with 4*root + 1 and appends one root bit.
// x has 2K bits, the root K bits.
//
// Interface: start (one clock) latches x; done pulses one clock with root
// valid from then on until the next start.  Latency: K + 1 clocks from start
// to done.  A start while busy restarts the computation.
// Helper of the phase analyzer; its structure is this design's own choice.
module int_sqrt #(
  parameter int unsigned K = 33
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [2*K-1:0] x,
  output logic           busy,
  output logic           done,
  output logic [K-1:0]   root
);
  localparam int unsigned CW = $clog2(K + 1);

  logic [2*K-1:0] x_q;
  logic [K+1:0]   rem_q;
  logic [K+3:0]   rem_sh, trial;
  logic [CW-1:0]  cnt_q;

  assign rem_sh = {rem_q, x_q[2*K-1 -: 2]};
  assign trial  = {2'b00, root, 2'b01};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q   <= '0;
      rem_q <= '0;
      root  <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        x_q   <= x;
        rem_q <= '0;
        root  <= '0;
        cnt_q <= CW'(K - 1);
        busy  <= 1'b1;
      end else if (busy) begin
        x_q <= x_q << 2;
        if (rem_sh >= trial) begin
          rem_q <= (K+2)'(rem_sh - trial);
          root  <= {root[K-2:0], 1'b1};
        end else begin
          rem_q <= rem_sh[K+1:0];
          root  <= {root[K-2:0], 1'b0};
        end
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
