// intersect_plane: ray / plane intersection, bit-serial and fixed-latency.
//
// For the ray o + t*d and the plane through POINT with normal NORMAL it
// forms t = n.(p - o) / (n.d) with two vec3_dot and one fp_div and no square
// root, as the document describes. `hit` is high when the ray runs toward the
// front face (n.d < 0) and t > T_MIN; the single-sided test is this design's
// choice, correct for a camera and shadow origins above the floor.
// Timing: `start` (while `busy` is low) latches o and d; the two dot products
// feed the divider one cycle later, and `done` is high PLN_LAT = 37 cycles
// after the `start` cycle with `hit` and `t`, which hold until the next
// `start`.
module intersect_plane
  import rt_pkg::*;
#(
  parameter vec3_t POINT  = PLN_P,
  parameter vec3_t NORMAL = PLN_N,
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
  typedef enum logic [1:0] {P_IDLE, P_DOT, P_DIV} pstate_t;
  pstate_t st;

  vec3_t po, dr;
  fix_t  num_c, den_c, den_r, q;
  logic  dv_busy, dv_done;

  // the divider is always idle when a new ray is latched
  a_div_idle: assert property (@(posedge clk) disable iff (rst) (st == P_DOT) |-> !dv_busy);

  vec3_dot u_num (.a(NORMAL), .b(po), .d(num_c));
  vec3_dot u_den (.a(NORMAL), .b(dr), .d(den_c));

  fp_div u_div (.clk, .rst, .start(st == P_DOT), .a(num_c), .b(den_c),
                .busy(dv_busy), .done(dv_done), .q(q));

  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= P_IDLE;
      po    <= '0;
      dr    <= '0;
      den_r <= '0;
      done  <= 1'b0;
      hit   <= 1'b0;
      t     <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        P_IDLE: if (start) begin
          po <= vsub(POINT, o);
          dr <= d;
          st <= P_DOT;
        end
        P_DOT: begin
          den_r <= den_c;
          st    <= P_DIV;
        end
        P_DIV: if (dv_done) begin
          done <= 1'b1;
          st   <= P_IDLE;
          if (den_r < 0 && q > T_MIN) begin hit <= 1'b1; t <= q;       end
          else                        begin hit <= 1'b0; t <= FIX_MAX; end
        end
        default: st <= P_IDLE;
      endcase
    end
  end

  assign busy = (st != P_IDLE);
endmodule
