// vec3_dot: combinational dot product of two Q13.10 vectors.
//
// Three fp_mul instances form the component products; a two-level adder
// tree sums them at 26 bits and the sum is saturated to a word. Like fp_mul
// it has no register, so the result follows the inputs in the same cycle.
// The structure (three multipliers plus an adder tree, no multiplier of its
// own) follows the document; the widened sum with saturation is this
// design's choice.
module vec3_dot
  import rt_pkg::*;
(
  input  vec3_t a,
  input  vec3_t b,
  output fix_t  d
);
  fix_t px, py, pz;
  fp_mul u_mx (.a(a.x), .b(b.x), .p(px));
  fp_mul u_my (.a(a.y), .b(b.y), .p(py));
  fp_mul u_mz (.a(a.z), .b(b.z), .p(pz));
  always_comb d = sat(48'(px) + 48'(py) + 48'(pz));
endmodule
