// fp_sqrt: bit-serial Q13.10 square root, r = sqrt(x).
//
// The radicand is x << 10 (34 bits), so its integer square root is the Q13.10
// root of x. The digit-by-digit method takes two radicand bits per clock and
// decides one root bit per clock with a single subtract and compare, 17 steps
// in all; the root is truncated (rounded down). Negative inputs give 0.
// On `start` the unit loads; with the last step `done` pulses for one cycle
// and `r` holds the result until the next `start`. `done` is high 18 cycles
// after the cycle in which `start` was high. The document fixes the bit-serial structure; the step count
// and the handling of negative inputs are this design's choices.
module fp_sqrt
  import rt_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  fix_t x,
  output logic busy,
  output logic done,
  output fix_t r
);
  localparam int RB = (FW + FRAC) / 2;         // 17 root bits

  logic [2*RB-1:0] rad;                        // radicand, shifted out 2 bits at a time
  logic [RB+1:0]   rem;
  logic [RB-1:0]   root;
  logic [4:0]      cnt;

  logic [RB+3:0]   acc;
  logic [RB+3:0]   trial;
  always_comb begin
    acc   = {rem, rad[2*RB-1 -: 2]};
    trial = acc - (RB+4)'({root, 2'b01});
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      r    <= '0;
      rad  <= '0;
      rem  <= '0;
      root <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        rad  <= x[FW-1] ? '0 : (2*RB)'(x) << FRAC;
        rem  <= '0;
        root <= '0;
        cnt  <= 5'(RB);
      end else if (busy) begin
        rem  <= trial[RB+3] ? acc[RB+1:0] : trial[RB+1:0];
        root <= {root[RB-2:0], ~trial[RB+3]};
        rad  <= rad << 2;
        cnt  <= cnt - 5'd1;
        if (cnt == 5'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
          r    <= fix_t'({root[RB-2:0], ~trial[RB+3]});
        end
      end
    end
  end
endmodule
