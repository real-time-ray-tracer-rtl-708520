// rt_ray_stage: pipeline stage S1, compute ray.
//
// Turns the pixel (pixel_x, pixel_y) into a unit camera-ray direction. The
// raw direction is a basis projection, CAM_U*(x - 240) + CAM_V*(y - 180) +
// CAM_W, formed with six constant multipliers; one rt_norm_stage (the "RAW"
// normalization) then scales it to unit length. pixel_x and the light
// position pass through and are re-registered at the output.
// Handshake: a transfer happens on a cycle where valid and ready are both
// high. The stage takes a pixel when s1_vld and s1_rdy (idle) are high;
// s2_vld rises 59 clock edges later (one for the projection, one to start
// the normalization, 56 for it, one to register) and stays high with stable
// data until s2_rdy. Port names and widths follow the stage interface table of
// the document; the camera basis (rt_pkg) is this design's choice.
module rt_ray_stage
  import rt_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  // from the row scheduler
  input  logic          s1_vld,
  output logic          s1_rdy,
  input  logic [XW-1:0] in_pixel_x,
  input  logic [YW-1:0] in_pixel_y,
  input  vec3_t         in_light,
  // to S2
  output logic          s2_vld,
  input  logic          s2_rdy,
  output logic [XW-1:0] out_pixel_x,
  output vec3_t         out_ray_dir,
  output vec3_t         out_light
);
  typedef enum logic [1:0] {R_IDLE, R_PROJ, R_NORM, R_HOLD} rstate_t;
  rstate_t st;

  fix_t  px, py;                 // pixel offsets from the image centre
  fix_t  ux, uy, uz, vx, vy, vz;
  vec3_t raw, dir;
  logic  nm_busy, nm_done;

  fp_mul u_ux (.a(px), .b(CAM_U.x), .p(ux));
  fp_mul u_uy (.a(px), .b(CAM_U.y), .p(uy));
  fp_mul u_uz (.a(px), .b(CAM_U.z), .p(uz));
  fp_mul u_vx (.a(py), .b(CAM_V.x), .p(vx));
  fp_mul u_vy (.a(py), .b(CAM_V.y), .p(vy));
  fp_mul u_vz (.a(py), .b(CAM_V.z), .p(vz));

  rt_norm_stage u_raw_norm (.clk, .rst, .start(st == R_NORM && !nm_busy && !nm_done),
                            .v(raw), .busy(nm_busy), .done(nm_done), .n(dir));

  always_ff @(posedge clk) begin
    if (rst) begin
      st          <= R_IDLE;
      px          <= '0;
      py          <= '0;
      raw         <= '0;
      s2_vld      <= 1'b0;
      out_pixel_x <= '0;
      out_ray_dir <= '0;
      out_light   <= '0;
    end else begin
      unique case (st)
        R_IDLE: if (s1_vld) begin
          px          <= fix_t'((int'(in_pixel_x) - IMG_W / 2) <<< FRAC);
          py          <= fix_t'((int'(in_pixel_y) - IMG_H / 2) <<< FRAC);
          out_pixel_x <= in_pixel_x;
          out_light   <= in_light;
          st          <= R_PROJ;
        end
        R_PROJ: begin
          raw.x <= sat(48'(ux) + 48'(vx) + 48'(CAM_W.x));
          raw.y <= sat(48'(uy) + 48'(vy) + 48'(CAM_W.y));
          raw.z <= sat(48'(uz) + 48'(vz) + 48'(CAM_W.z));
          st    <= R_NORM;
        end
        R_NORM: if (nm_done) begin
          out_ray_dir <= dir;
          s2_vld      <= 1'b1;
          st          <= R_HOLD;
        end
        R_HOLD: if (s2_rdy) begin
          s2_vld <= 1'b0;
          st     <= R_IDLE;
        end
        default: st <= R_IDLE;
      endcase
    end
  end

  assign s1_rdy = (st == R_IDLE);

  a_hold: assert property (@(posedge clk) disable iff (rst)
                           s2_vld && !s2_rdy |=> s2_vld && $stable(out_ray_dir) && $stable(out_pixel_x));
endmodule
