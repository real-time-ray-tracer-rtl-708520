// trace_pipe: stages S2 (intersect), S3 (shade) and S4 (shadow or reflect)
// of one lane, chained by valid/ready handshakes.
//
// Each stage holds one pixel, so together with S1 a lane has four pixels in
// flight. A stage whose consumer is still busy keeps its output valid and
// stable and does not take new input, so bubbles and back-pressure from the
// line buffer (wr_rdy) are tolerated. Latency through the three stages is
// about 115 + 58 + 58 cycles; the initiation interval of the lane is set by
// S2 (about 115 cycles). The chain follows the document's stage list and
// handshake rule.
module trace_pipe
  import rt_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          s2_vld,
  output logic          s2_rdy,
  input  logic [XW-1:0] pixel_x,
  input  vec3_t         ray_dir,
  input  vec3_t         light,
  output logic          wr_vld,
  input  logic          wr_rdy,
  output logic [XW-1:0] col_addr,
  output logic [23:0]   rgb888
);
  logic          s3_vld, s3_rdy, s4_vld, s4_rdy;
  logic [XW-1:0] x3, x4;
  obj_id_t       obj3, obj4;
  vec3_t         hp3, n3, d3, l3, ca4, cb4, so4, sd4;

  rt_isect_stage u_s2 (
    .clk, .rst,
    .s2_vld, .s2_rdy, .in_pixel_x(pixel_x), .in_ray_dir(ray_dir), .in_light(light),
    .s3_vld, .s3_rdy, .out_pixel_x(x3), .out_obj_id(obj3), .out_hit_point(hp3),
    .out_normal(n3), .out_ray_dir(d3), .out_light(l3)
  );

  rt_shade_stage u_s3 (
    .clk, .rst,
    .s3_vld, .s3_rdy, .in_pixel_x(x3), .in_obj_id(obj3), .in_hit_point(hp3),
    .in_normal(n3), .in_ray_dir(d3), .in_light(l3),
    .s4_vld, .s4_rdy, .out_pixel_x(x4), .out_obj_id(obj4), .out_color_a(ca4),
    .out_color_b(cb4), .out_sec_origin(so4), .out_sec_dir(sd4)
  );

  rt_shadow_stage u_s4 (
    .clk, .rst,
    .s4_vld, .s4_rdy, .in_pixel_x(x4), .in_obj_id(obj4), .in_color_a(ca4),
    .in_color_b(cb4), .in_sec_origin(so4), .in_sec_dir(sd4),
    .wr_vld, .wr_rdy, .col_addr, .rgb888
  );
endmodule
