// rt_norm_stage: vector normalization unit, n = v / |v|.
//
// A small sequencer around one vec3_dot, one fp_sqrt, one fp_div and three
// fp_mul, the primitive mix the document lists for this unit:
//   cycle 0      `start` latches v
//   cycle 1      |v|^2 = v.v (combinational) is loaded into the root unit
//   18 cycles    |v| = sqrt(|v|^2)
//   35 cycles    inv = 64 / |v| (the reciprocal scaled by 2^RECIP_SHIFT)
//   1 cycle      n = (v * inv) / 64 is registered, `done` pulses
// so `done` comes NORM_LAT = 56 cycles after `start`, and `n` holds until the
// next `start`. `busy` is high from the cycle after `start` until `done`.
// Because |v|^2 saturates at the top of the Q13.10 range, inputs should
// have a length below about 90. The zero vector returns a saturated result.
// The order of operations is this design's reading of the document's
// primitive counts (one dot, one root, one divide, three multiplies); the
// scaled reciprocal is this design's choice, made because a plain Q13.10
// reciprocal of a long vector keeps too few significant bits.
module rt_norm_stage
  import rt_pkg::*;
#(
  // The reciprocal is formed as 2^RECIP_SHIFT / |v| to keep 6 more bits of
  // it; the products are shifted back. Valid for |v| above 2^RECIP_SHIFT/8192.
  parameter int RECIP_SHIFT = 6
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  vec3_t v,
  output logic  busy,
  output logic  done,
  output vec3_t n
);
  typedef enum logic [2:0] {N_IDLE, N_DOT, N_SQRT, N_DIV, N_MUL} nstate_t;
  nstate_t st;

  vec3_t vr;
  fix_t  len2_c, inv;
  fix_t  root, recip;
  logic  sq_start, sq_busy, sq_done;
  logic  dv_start, dv_busy, dv_done;
  vec3_t nv;

  vec3_dot u_dot (.a(vr), .b(vr), .d(len2_c));

  fp_sqrt u_sqrt (.clk, .rst, .start(sq_start), .x(len2_c), .busy(sq_busy),
                  .done(sq_done), .r(root));
  fp_div  u_div  (.clk, .rst, .start(dv_start), .a(fix_t'(FIX_ONE << RECIP_SHIFT)), .b(root),
                  .busy(dv_busy), .done(dv_done), .q(recip));

  fix_t px, py, pz;
  fp_mul u_mx (.a(vr.x), .b(inv), .p(px));
  fp_mul u_my (.a(vr.y), .b(inv), .p(py));
  fp_mul u_mz (.a(vr.z), .b(inv), .p(pz));
  always_comb begin
    nv.x = px >>> RECIP_SHIFT;
    nv.y = py >>> RECIP_SHIFT;
    nv.z = pz >>> RECIP_SHIFT;
  end

  always_comb begin
    sq_start = (st == N_DOT);
    dv_start = (st == N_SQRT) && sq_done;
    inv      = recip;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st   <= N_IDLE;
      vr   <= '0;
      n    <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        N_IDLE: if (start) begin
          vr <= v;
          st <= N_DOT;
        end
        N_DOT: st <= N_SQRT;
        N_SQRT: if (sq_done) st <= N_DIV;
        N_DIV:  if (dv_done) st <= N_MUL;
        N_MUL: begin
          n    <= nv;
          done <= 1'b1;
          st   <= N_IDLE;
        end
        default: st <= N_IDLE;
      endcase
    end
  end

  assign busy = (st != N_IDLE);

  // The sub-units are only started while idle.
  a_sqrt_idle: assert property (@(posedge clk) disable iff (rst) sq_start |-> !sq_busy);
  a_div_idle:  assert property (@(posedge clk) disable iff (rst) dv_start |-> !dv_busy);
endmodule
