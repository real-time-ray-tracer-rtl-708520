// rt_shade_stage: pipeline stage S3, shade.
//
// Computes the local shading of the primary hit and sets up the secondary
// ray for S4:
//   * light direction l = normalize(light - hit_point) ("LIGHT" rt_norm_stage)
//   * luminosity max(0, n.l) from one vec3_dot
//   * base colour: solid blue for the sphere, a unit checkerboard for the
//     plane, the sky gradient (from ray_dir.y) for a miss
//   * color_a = ambient term base*K_AMBIENT (three constant multipliers),
//     color_b = diffuse term base*lum (three multipliers); a miss carries the
//     sky colour in color_a and zero in color_b
//   * secondary ray from the hit point: toward the light for a plane hit
//     (shadow ray), the mirror direction d - 2(d.n)n for a sphere hit
// Timing: the pixel is taken on s3_vld/s3_rdy; the light normalization takes
// 56 cycles, one more cycle registers the results, then s4_vld is held with
// stable data until s4_rdy.
// The shading rule and the outputs follow the document. The ambient weight
// and colours (rt_pkg) and the extra dot product and multipliers used for
// the mirror direction, which the document's primitive count leaves out,
// are this design's choices.
module rt_shade_stage
  import rt_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          s3_vld,
  output logic          s3_rdy,
  input  logic [XW-1:0] in_pixel_x,
  input  obj_id_t       in_obj_id,
  input  vec3_t         in_hit_point,
  input  vec3_t         in_normal,
  input  vec3_t         in_ray_dir,
  input  vec3_t         in_light,
  output logic          s4_vld,
  input  logic          s4_rdy,
  output logic [XW-1:0] out_pixel_x,
  output obj_id_t       out_obj_id,
  output vec3_t         out_color_a,
  output vec3_t         out_color_b,
  output vec3_t         out_sec_origin,
  output vec3_t         out_sec_dir
);
  typedef enum logic [1:0] {H_IDLE, H_NORM, H_HOLD} hstate_t;
  hstate_t st;

  obj_id_t obj;
  vec3_t   hp, nrm, dir, lgt;
  vec3_t   ldir, base, amb, dif, refl, dn2n;
  fix_t    ndotl, lum, ddotn, ddotn2;
  logic    nm_busy, nm_done;

  rt_norm_stage u_light_norm (.clk, .rst, .start(st == H_NORM && !nm_busy && !nm_done),
                              .v(vsub(lgt, hp)), .busy(nm_busy), .done(nm_done), .n(ldir));

  vec3_dot u_ndotl (.a(nrm), .b(ldir), .d(ndotl));
  always_comb lum = ndotl[FW-1] ? '0 : ndotl;

  always_comb begin
    unique case (obj)
      OBJ_SPHERE: base = COL_SPHERE;
      OBJ_PLANE:  base = checker_col(hp.x, hp.z);
      default:    base = sky_col(dir.y);
    endcase
  end

  fp_mul u_ar (.a(base.x), .b(K_AMBIENT), .p(amb.x));
  fp_mul u_ag (.a(base.y), .b(K_AMBIENT), .p(amb.y));
  fp_mul u_ab (.a(base.z), .b(K_AMBIENT), .p(amb.z));
  fp_mul u_dr (.a(base.x), .b(lum), .p(dif.x));
  fp_mul u_dg (.a(base.y), .b(lum), .p(dif.y));
  fp_mul u_db (.a(base.z), .b(lum), .p(dif.z));

  // mirror direction d - 2(d.n)n
  vec3_dot u_ddotn (.a(dir), .b(nrm), .d(ddotn));
  always_comb ddotn2 = fadd(ddotn, ddotn);
  fp_mul u_rx (.a(ddotn2), .b(nrm.x), .p(dn2n.x));
  fp_mul u_ry (.a(ddotn2), .b(nrm.y), .p(dn2n.y));
  fp_mul u_rz (.a(ddotn2), .b(nrm.z), .p(dn2n.z));
  always_comb refl = vsub(dir, dn2n);

  always_ff @(posedge clk) begin
    if (rst) begin
      st             <= H_IDLE;
      obj            <= OBJ_MISS;
      hp             <= '0;
      nrm            <= '0;
      dir            <= '0;
      lgt            <= '0;
      s4_vld         <= 1'b0;
      out_pixel_x    <= '0;
      out_obj_id     <= OBJ_MISS;
      out_color_a    <= '0;
      out_color_b    <= '0;
      out_sec_origin <= '0;
      out_sec_dir    <= '0;
    end else begin
      unique case (st)
        H_IDLE: if (s3_vld) begin
          out_pixel_x <= in_pixel_x;
          obj         <= in_obj_id;
          hp          <= in_hit_point;
          nrm         <= in_normal;
          dir         <= in_ray_dir;
          lgt         <= in_light;
          st          <= H_NORM;
        end
        H_NORM: if (nm_done) begin
          out_obj_id     <= obj;
          out_sec_origin <= hp;
          if (obj == OBJ_MISS) begin
            out_color_a <= base;
            out_color_b <= '0;
            out_sec_dir <= dir;
          end else begin
            out_color_a <= amb;
            out_color_b <= dif;
            out_sec_dir <= (obj == OBJ_SPHERE) ? refl : ldir;
          end
          s4_vld <= 1'b1;
          st     <= H_HOLD;
        end
        H_HOLD: if (s4_rdy) begin
          s4_vld <= 1'b0;
          st     <= H_IDLE;
        end
        default: st <= H_IDLE;
      endcase
    end
  end

  assign s3_rdy = (st == H_IDLE);

  a_hold: assert property (@(posedge clk) disable iff (rst)
                           s4_vld && !s4_rdy |=> s4_vld && $stable(out_color_a) && $stable(out_sec_dir));
endmodule
