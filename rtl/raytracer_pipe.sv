// raytracer_pipe: one complete trace lane, S1 (compute ray) then trace_pipe
// (S2 intersect, S3 shade, S4 shadow or reflect).
//
// It takes one pixel coordinate at a time on s1_vld/s1_rdy together with the
// light position, and emits the finished pixel as (col_addr, rgb888) on
// wr_vld/wr_rdy. Four pixels can be in flight, one per stage. The design
// instantiates six of these lanes side by side; nothing is shared between
// lanes or stages, as in the document.
module raytracer_pipe
  import rt_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          s1_vld,
  output logic          s1_rdy,
  input  logic [XW-1:0] pixel_x,
  input  logic [YW-1:0] pixel_y,
  input  vec3_t         light,
  output logic          wr_vld,
  input  logic          wr_rdy,
  output logic [XW-1:0] col_addr,
  output logic [23:0]   rgb888
);
  logic          s2_vld, s2_rdy;
  logic [XW-1:0] x2;
  vec3_t         d2, l2;

  rt_ray_stage u_s1 (
    .clk, .rst,
    .s1_vld, .s1_rdy, .in_pixel_x(pixel_x), .in_pixel_y(pixel_y), .in_light(light),
    .s2_vld, .s2_rdy, .out_pixel_x(x2), .out_ray_dir(d2), .out_light(l2)
  );

  trace_pipe u_trace (
    .clk, .rst,
    .s2_vld, .s2_rdy, .pixel_x(x2), .ray_dir(d2), .light(l2),
    .wr_vld, .wr_rdy, .col_addr, .rgb888
  );
endmodule
