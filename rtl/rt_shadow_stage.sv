// rt_shadow_stage: pipeline stage S4, shadow or reflect, and combine.
//
// Traces the one-bounce secondary ray set up by S3 and produces the final
// pixel. The ray starts at sec_origin + SHADOW_EPS*sec_dir (three constant
// multipliers) so that it does not hit its own surface.
//   * plane hit (obj_id 01): shadow ray toward the light, tested against the
//     sphere. Blocked: only the ambient term color_a; free: color_a + color_b.
//   * sphere hit (obj_id 10): mirror ray, tested against the plane. It
//     returns the checkerboard colour at the bounce point, or the sky
//     gradient if it misses; the result is K_OWN*(color_a + color_b) +
//     K_REFLECT*reflected.
//   * miss (obj_id 00): color_a (the sky) as is.
// Each channel is clamped to [0, 1] and scaled to 8 bits, packed 0xRRGGBB
// as rgb888, with col_addr = pixel_x as the line-buffer write index.
// Timing: both tracers start when a pixel is taken on s4_vld/s4_rdy; the
// sphere unit's 55 cycles dominate, two more cycles form the reflected hit
// point and the colour, then wr_vld is held with stable data until wr_rdy.
// The shadow/reflection rule and the port list follow the document. The
// document counts only a sphere tracer in this stage; the plane tracer for
// the reflected ray and the blend weights are this design's choices.
module rt_shadow_stage
  import rt_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          s4_vld,
  output logic          s4_rdy,
  input  logic [XW-1:0] in_pixel_x,
  input  obj_id_t       in_obj_id,
  input  vec3_t         in_color_a,
  input  vec3_t         in_color_b,
  input  vec3_t         in_sec_origin,
  input  vec3_t         in_sec_dir,
  output logic          wr_vld,
  input  logic          wr_rdy,
  output logic [XW-1:0] col_addr,
  output logic [23:0]   rgb888
);
  typedef enum logic [2:0] {C_IDLE, C_TRACE, C_BOUNCE, C_MIX, C_HOLD} cstate_t;
  cstate_t st;

  vec3_t   offs, org_c, org, sdir;
  obj_id_t obj;
  vec3_t   ca, cb, own, rcol, bounce_c, bounce;
  vec3_t   mix_own, mix_ref, final_c;
  logic    sp_busy, sp_done, sp_hit, pl_busy, pl_done, pl_hit;
  logic    sp_seen, pl_seen, shadowed, refl_hit;
  fix_t    pl_t, tdx, tdz;
  fix_t    sp_t;        // unused: any sphere hit toward the light shadows

  fp_mul u_ox (.a(in_sec_dir.x), .b(SHADOW_EPS), .p(offs.x));
  fp_mul u_oy (.a(in_sec_dir.y), .b(SHADOW_EPS), .p(offs.y));
  fp_mul u_oz (.a(in_sec_dir.z), .b(SHADOW_EPS), .p(offs.z));
  always_comb org_c = vadd(in_sec_origin, offs);

  intersect_sphere u_shadow (.clk, .rst, .start(s4_vld && s4_rdy), .o(org_c), .d(in_sec_dir),
                             .busy(sp_busy), .done(sp_done), .hit(sp_hit), .t(sp_t));
  intersect_plane  u_bounce (.clk, .rst, .start(s4_vld && s4_rdy), .o(org_c), .d(in_sec_dir),
                             .busy(pl_busy), .done(pl_done), .hit(pl_hit), .t(pl_t));

  // reflected ray's bounce point on the floor (only x and z are needed)
  fp_mul u_bx (.a(pl_t), .b(sdir.x), .p(tdx));
  fp_mul u_bz (.a(pl_t), .b(sdir.z), .p(tdz));
  always_comb begin
    bounce_c   = '0;
    bounce_c.x = fadd(org.x, tdx);
    bounce_c.z = fadd(org.z, tdz);
  end

  always_comb begin
    own  = vadd(ca, cb);
    rcol = refl_hit ? checker_col(bounce.x, bounce.z) : sky_col(sdir.y);
  end

  fp_mul u_wor (.a(own.x),  .b(K_OWN),     .p(mix_own.x));
  fp_mul u_wog (.a(own.y),  .b(K_OWN),     .p(mix_own.y));
  fp_mul u_wob (.a(own.z),  .b(K_OWN),     .p(mix_own.z));
  fp_mul u_wrr (.a(rcol.x), .b(K_REFLECT), .p(mix_ref.x));
  fp_mul u_wrg (.a(rcol.y), .b(K_REFLECT), .p(mix_ref.y));
  fp_mul u_wrb (.a(rcol.z), .b(K_REFLECT), .p(mix_ref.z));

  always_comb begin
    unique case (obj)
      OBJ_PLANE:  final_c = shadowed ? ca : own;
      OBJ_SPHERE: final_c = vadd(mix_own, mix_ref);
      default:    final_c = ca;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= C_IDLE;
      obj      <= OBJ_MISS;
      ca       <= '0;
      cb       <= '0;
      org      <= '0;
      sdir     <= '0;
      bounce   <= '0;
      sp_seen  <= 1'b0;
      pl_seen  <= 1'b0;
      shadowed <= 1'b0;
      refl_hit <= 1'b0;
      wr_vld   <= 1'b0;
      col_addr <= '0;
      rgb888   <= '0;
    end else begin
      unique case (st)
        C_IDLE: if (s4_vld) begin
          col_addr <= in_pixel_x;
          obj      <= in_obj_id;
          ca       <= in_color_a;
          cb       <= in_color_b;
          org      <= org_c;
          sdir     <= in_sec_dir;
          sp_seen  <= 1'b0;
          pl_seen  <= 1'b0;
          st       <= C_TRACE;
        end
        C_TRACE: begin
          if (sp_done) sp_seen <= 1'b1;
          if (pl_done) pl_seen <= 1'b1;
          if ((sp_seen || sp_done) && (pl_seen || pl_done)) st <= C_BOUNCE;
        end
        C_BOUNCE: begin
          shadowed <= sp_hit;
          refl_hit <= pl_hit;
          bounce   <= bounce_c;
          st       <= C_MIX;
        end
        C_MIX: begin
          rgb888 <= to_rgb888(final_c);
          wr_vld <= 1'b1;
          st     <= C_HOLD;
        end
        C_HOLD: if (wr_rdy) begin
          wr_vld <= 1'b0;
          st     <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  assign s4_rdy = (st == C_IDLE);

  // a pixel is only taken while both tracers are idle
  a_units_idle: assert property (@(posedge clk) disable iff (rst)
                                 s4_vld && s4_rdy |-> !sp_busy && !pl_busy);
  a_hold: assert property (@(posedge clk) disable iff (rst)
                           wr_vld && !wr_rdy |=> wr_vld && $stable(rgb888) && $stable(col_addr));
endmodule
