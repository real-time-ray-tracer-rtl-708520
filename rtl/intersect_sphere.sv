// intersect_sphere: ray / sphere intersection, bit-serial and fixed-latency.
//
// For the ray o + t*d (d of unit length, as every ray in this design is)
// and the sphere |p - C| = r it solves the quadratic a*t^2 + 2*h*t + c = 0
// with a = d.d and h = (o-C).d. The discriminant h*h - a*c is formed in the
// numerically safer way r*r - |q|^2, where q = (o-C) - h*d is the offset
// from the centre to the closest point of the ray: with 10 fraction bits,
// subtracting two products of about 50 (camera 7 units away) would lose the
// silhouette. One fp_sqrt takes the root s, and two fp_div instances form
// both roots t0 = (-h - s)/a and t1 = (-h + s)/a in parallel. The result is
// the nearest root above T_MIN; `hit` is low when the discriminant is
// negative or both roots lie behind the origin.
// The document gives the quadratic, one root and two divides per sphere
// test, and three dot products; the form of the discriminant (three
// variable multiplies h*d plus the constant r*r) and T_MIN are this
// design's choices.
// Timing: `start` (while `busy` is low) registers a, h, o-C and d; `done`
// is high SPH_LAT = 55 cycles after the `start` cycle, with `hit` and `t`,
// which hold until the next `start`. Every step always runs, so the latency
// is fixed.
module intersect_sphere
  import rt_pkg::*;
#(
  parameter vec3_t CENTER = SPH_C,
  parameter fix_t  RADIUS = SPH_R,
  parameter fix_t  T_MIN  = 24'sd0
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  vec3_t o,
  input  vec3_t d,
  output logic  busy,
  output logic  done,
  output logic  hit,
  output fix_t  t
);
  typedef enum logic [1:0] {S_IDLE, S_DISC, S_SQRT, S_DIV} sstate_t;
  sstate_t st;

  vec3_t oc, oc_r, d_r, hd, q;
  fix_t  a_c, h_c, r2, qq;
  fix_t  a_r, h_r, disc;
  logic  disc_neg;
  fix_t  s;
  fix_t  t0, t1;
  logic  sq_busy, sq_done, d0_busy, d0_done, d1_busy, d1_done;

  // a and h of the incoming ray, registered when the ray is taken.
  always_comb oc = vsub(o, CENTER);
  vec3_dot u_da (.a(d),  .b(d),  .d(a_c));
  vec3_dot u_dh (.a(oc), .b(d),  .d(h_c));

  // Discriminant r*r - |oc - h*d|^2 from the registered values.
  fp_mul   u_hx (.a(h_r), .b(d_r.x), .p(hd.x));
  fp_mul   u_hy (.a(h_r), .b(d_r.y), .p(hd.y));
  fp_mul   u_hz (.a(h_r), .b(d_r.z), .p(hd.z));
  always_comb q = vsub(oc_r, hd);
  vec3_dot u_dq (.a(q), .b(q), .d(qq));
  fp_mul   u_r2 (.a(RADIUS), .b(RADIUS), .p(r2));
  always_comb disc = fsub(r2, qq);

  fp_sqrt u_sqrt (.clk, .rst, .start(st == S_DISC), .x(disc), .busy(sq_busy),
                  .done(sq_done), .r(s));
  fp_div  u_div0 (.clk, .rst, .start(sq_done), .a(fsub(-h_r, s)), .b(a_r),
                  .busy(d0_busy), .done(d0_done), .q(t0));
  fp_div  u_div1 (.clk, .rst, .start(sq_done), .a(fadd(-h_r, s)), .b(a_r),
                  .busy(d1_busy), .done(d1_done), .q(t1));

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= S_IDLE;
      oc_r     <= '0;
      d_r      <= '0;
      a_r      <= '0;
      h_r      <= '0;
      disc_neg <= 1'b0;
      done     <= 1'b0;
      hit      <= 1'b0;
      t        <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          a_r  <= a_c;
          h_r  <= h_c;
          oc_r <= oc;
          d_r  <= d;
          st   <= S_DISC;
        end
        S_DISC: begin
          disc_neg <= disc[FW-1];
          st       <= S_SQRT;
        end
        S_SQRT: if (sq_done) st <= S_DIV;
        S_DIV: if (d0_done) begin
          done <= 1'b1;
          st   <= S_IDLE;
          if (disc_neg)         begin hit <= 1'b0; t <= FIX_MAX; end
          else if (t0 > T_MIN)  begin hit <= 1'b1; t <= t0;      end
          else if (t1 > T_MIN)  begin hit <= 1'b1; t <= t1;      end
          else                  begin hit <= 1'b0; t <= FIX_MAX; end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

  // the sub-units are always free when a new ray arrives
  a_units_idle: assert property (@(posedge clk) disable iff (rst)
                                 (st == S_DISC) |-> !sq_busy && !d0_busy && !d1_busy);
  a_divs_together: assert property (@(posedge clk) disable iff (rst) d0_done == d1_done);
endmodule
