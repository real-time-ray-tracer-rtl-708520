// rt_isect_stage: pipeline stage S2, intersect.
//
// Casts the primary ray from the camera eye along ray_dir against the
// sphere and the plane at once (one intersect_sphere, one intersect_plane),
// keeps the nearer hit or reports a miss, forms the hit point eye + t*dir
// with three multipliers, and derives the unit surface normal: for the
// sphere the "NORMAL" rt_norm_stage normalizes hit_point - centre, for the
// plane it is the plane's normal. obj_id is 00 miss, 01 plane, 10 sphere.
// pixel_x, ray_dir and light pass through and are re-registered.
// Timing: after s2_vld/s2_rdy both units start; the sphere unit's 55 cycles
// dominate, then one cycle for the hit point and 56 for the normal, after
// which s3_vld is held with stable data until s3_rdy. The unit always
// normalizes, also for plane hits and misses, so its latency is fixed.
// Behaviour and port list follow the document; computing the hit point and
// normal inside this stage (the document counts them at lane level) is this
// design's choice of where to draw the stage boundary.
module rt_isect_stage
  import rt_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          s2_vld,
  output logic          s2_rdy,
  input  logic [XW-1:0] in_pixel_x,
  input  vec3_t         in_ray_dir,
  input  vec3_t         in_light,
  output logic          s3_vld,
  input  logic          s3_rdy,
  output logic [XW-1:0] out_pixel_x,
  output obj_id_t       out_obj_id,
  output vec3_t         out_hit_point,
  output vec3_t         out_normal,
  output vec3_t         out_ray_dir,
  output vec3_t         out_light
);
  typedef enum logic [2:0] {I_IDLE, I_ISECT, I_HP, I_NORM, I_HOLD} istate_t;
  istate_t st;

  logic    sp_busy, sp_done, sp_hit, pl_busy, pl_done, pl_hit;
  logic    sp_seen, pl_seen;
  fix_t    sp_t, pl_t, t_sel;
  obj_id_t obj;
  vec3_t   td, hp, nrm;
  logic    nm_busy, nm_done;

  intersect_sphere u_sphere (.clk, .rst, .start(s2_vld && s2_rdy), .o(CAM_EYE), .d(in_ray_dir),
                             .busy(sp_busy), .done(sp_done), .hit(sp_hit), .t(sp_t));
  intersect_plane  u_plane  (.clk, .rst, .start(s2_vld && s2_rdy), .o(CAM_EYE), .d(in_ray_dir),
                             .busy(pl_busy), .done(pl_done), .hit(pl_hit), .t(pl_t));

  // nearer of the two hits
  always_comb begin
    if (sp_hit && (!pl_hit || sp_t <= pl_t)) begin obj = OBJ_SPHERE; t_sel = sp_t; end
    else if (pl_hit)                         begin obj = OBJ_PLANE;  t_sel = pl_t; end
    else                                     begin obj = OBJ_MISS;   t_sel = '0;   end
  end

  fp_mul u_hx (.a(t_sel), .b(out_ray_dir.x), .p(td.x));
  fp_mul u_hy (.a(t_sel), .b(out_ray_dir.y), .p(td.y));
  fp_mul u_hz (.a(t_sel), .b(out_ray_dir.z), .p(td.z));

  rt_norm_stage u_nrm_norm (.clk, .rst, .start(st == I_NORM && !nm_busy && !nm_done),
                            .v(vsub(hp, SPH_C)), .busy(nm_busy), .done(nm_done), .n(nrm));

  always_ff @(posedge clk) begin
    if (rst) begin
      st            <= I_IDLE;
      sp_seen       <= 1'b0;
      pl_seen       <= 1'b0;
      hp            <= '0;
      s3_vld        <= 1'b0;
      out_pixel_x   <= '0;
      out_obj_id    <= OBJ_MISS;
      out_hit_point <= '0;
      out_normal    <= '0;
      out_ray_dir   <= '0;
      out_light     <= '0;
    end else begin
      unique case (st)
        I_IDLE: if (s2_vld) begin
          out_pixel_x <= in_pixel_x;
          out_ray_dir <= in_ray_dir;
          out_light   <= in_light;
          sp_seen     <= 1'b0;
          pl_seen     <= 1'b0;
          st          <= I_ISECT;
        end
        I_ISECT: begin
          if (sp_done) sp_seen <= 1'b1;
          if (pl_done) pl_seen <= 1'b1;
          if ((sp_seen || sp_done) && (pl_seen || pl_done)) st <= I_HP;
        end
        I_HP: begin
          out_obj_id <= obj;
          hp         <= vadd(CAM_EYE, td);
          st         <= I_NORM;
        end
        I_NORM: if (nm_done) begin
          out_hit_point <= hp;
          out_normal    <= (out_obj_id == OBJ_SPHERE) ? nrm :
                           (out_obj_id == OBJ_PLANE)  ? PLN_N : '0;
          s3_vld        <= 1'b1;
          st            <= I_HOLD;
        end
        I_HOLD: if (s3_rdy) begin
          s3_vld <= 1'b0;
          st     <= I_IDLE;
        end
        default: st <= I_IDLE;
      endcase
    end
  end

  assign s2_rdy = (st == I_IDLE);

  a_hold: assert property (@(posedge clk) disable iff (rst)
                           s3_vld && !s3_rdy |=> s3_vld && $stable(out_hit_point) && $stable(out_obj_id));
  a_units_idle: assert property (@(posedge clk) disable iff (rst)
                                 (s2_vld && s2_rdy) |-> !sp_busy && !pl_busy);
endmodule
