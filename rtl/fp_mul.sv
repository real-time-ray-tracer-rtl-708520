// fp_mul: combinational signed Q13.10 multiply.
//
// The two 24-bit operands are multiplied into a 48-bit product, which is
// shifted right arithmetically by the 10 fractional bits (rounding toward
// minus infinity) and saturated to the 24-bit range. There is no register:
// the result is valid in the same cycle as the operands. With one operand a
// constant, synthesis reduces it to shift-and-add logic; with two variables
// it maps onto a DSP multiplier. The document gives the format and the
// combinational 24x24 multiplier; saturation instead of wrap-around is this
// design's choice.
module fp_mul
  import rt_pkg::*;
(
  input  fix_t a,
  input  fix_t b,
  output fix_t p
);
  logic signed [47:0] prod;
  always_comb begin
    prod = 48'(a) * 48'(b);
    p    = sat(prod >>> FRAC);
  end
endmodule
