// fp_div: bit-serial signed Q13.10 divider, q = a / b.
//
// A restoring divider that produces one quotient bit per clock. On `start`
// it latches |a| << 10 as a 34-bit dividend and |b| as the divisor, then runs
// 34 shift/compare/subtract steps. The last step also applies the sign,
// saturates the magnitude to the 24-bit range and pulses `done` for one
// cycle; `q` then holds the result until the next `start`. `done` is high
// 35 cycles after the cycle in which `start` was high, and a new `start` is
// accepted in the `done` cycle or later (`busy` low). Division by zero
// returns the saturated value with the sign of `a`.
// The document fixes the bit-serial structure (registers, subtractors and
// comparators, no multiplier); the step count, the saturation and the
// divide-by-zero result are this design's choices.
module fp_div
  import rt_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  fix_t a,
  input  fix_t b,
  output logic busy,
  output logic done,
  output fix_t q
);
  localparam int ITER = FW + FRAC;             // 34 quotient bits

  logic [ITER-1:0] num;                        // dividend, shifted out MSB first
  logic [ITER-1:0] quo;
  logic [FW:0]     rem;                        // partial remainder
  logic [FW-1:0]   den;
  logic            neg;
  logic [5:0]      cnt;

  logic [FW+1:0]   trial;
  logic [ITER-1:0] quo_n;
  always_comb begin
    trial = {rem, num[ITER-1]} - {1'b0, {1'b0, den}};
    quo_n = {quo[ITER-2:0], ~trial[FW+1]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      q    <= '0;
      cnt  <= '0;
      num  <= '0;
      quo  <= '0;
      rem  <= '0;
      den  <= '0;
      neg  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        num  <= ITER'(a[FW-1] ? -48'(a) : 48'(a)) << FRAC;
        den  <= FW'(b[FW-1] ? -48'(b) : 48'(b));
        neg  <= a[FW-1] ^ b[FW-1];
        rem  <= '0;
        quo  <= '0;
        cnt  <= 6'(ITER);
      end else if (busy) begin
        rem <= trial[FW+1] ? {rem[FW-1:0], num[ITER-1]} : trial[FW:0];
        quo <= quo_n;
        num <= num << 1;
        cnt <= cnt - 6'd1;
        if (cnt == 6'd1) begin
          // last step: apply the sign and saturate
          busy <= 1'b0;
          done <= 1'b1;
          if (den == '0 || quo_n > ITER'(FIX_MAX))
            q <= neg ? FIX_MIN : FIX_MAX;
          else
            q <= neg ? -fix_t'(quo_n) : fix_t'(quo_n);
        end
      end
    end
  end
endmodule
