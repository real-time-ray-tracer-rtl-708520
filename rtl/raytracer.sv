// raytracer: FPGA side of the real-time ray tracer, one image row per job.
//
// The host programs the light position and a row index through the control
// slave (rt_avalon_slave), writes start and polls STATUS.done. The row
// scheduler then feeds the LANES parallel trace lanes (raytracer_pipe: compute
// ray, intersect, shade, shadow or reflect) with batches of LANES adjacent
// pixels; every lane writes its finished pixels into its bank of the line
// buffer, and when all WIDTH pixels are in, done is raised. The host then
// reads the row through the second slave, word x holding 0x00RRGGBB of
// column x. Both slaves have a read latency of one cycle.
// Ports: clk, synchronous active-high rst; the control slave (avs_ctrl_*,
// word address 0..5); the line-buffer slave (avs_lb_*, word address 0..479).
// The structure, register map and row/batch protocol follow the document.
module raytracer
  import rt_pkg::*;
#(
  parameter int LANES = 6,
  parameter int WIDTH = IMG_W
) (
  input  logic          clk,
  input  logic          rst,
  // control / status slave
  input  logic [2:0]    avs_ctrl_address,
  input  logic          avs_ctrl_write,
  input  logic [31:0]   avs_ctrl_writedata,
  input  logic          avs_ctrl_read,
  output logic [31:0]   avs_ctrl_readdata,
  // line-buffer window
  input  logic [8:0]    avs_lb_address,
  input  logic          avs_lb_read,
  output logic [31:0]   avs_lb_readdata
);
  logic          start, row_done, sched_busy;
  logic [YW-1:0] row_y, pixel_y;
  vec3_t         light, lane_light;
  logic          lane_vld;
  logic [XW-1:0] batch_x;
  logic [LANES-1:0]          lane_rdy, lane_wr;
  logic [LANES-1:0][XW-1:0]  lane_col;
  logic [LANES-1:0][23:0]    lane_rgb;
  logic [23:0]   lb_data;

  rt_avalon_slave u_slave (
    .clk, .rst,
    .address(avs_ctrl_address), .write(avs_ctrl_write), .writedata(avs_ctrl_writedata),
    .read(avs_ctrl_read), .readdata(avs_ctrl_readdata),
    .start, .row_y, .light, .row_done
  );

  row_scheduler #(.LANES(LANES), .WIDTH(WIDTH)) u_sched (
    .clk, .rst, .start, .row_y, .light, .busy(sched_busy), .done(row_done),
    .lane_vld, .lane_rdy, .batch_x, .pixel_y, .lane_light, .lane_wr
  );

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    raytracer_pipe u_pipe (
      .clk, .rst,
      .s1_vld(lane_vld), .s1_rdy(lane_rdy[i]),
      .pixel_x(batch_x + XW'(i)), .pixel_y(pixel_y), .light(lane_light),
      .wr_vld(lane_wr[i]), .wr_rdy(1'b1), .col_addr(lane_col[i]), .rgb888(lane_rgb[i])
    );
  end

  line_buffer #(.LANES(LANES), .WIDTH(WIDTH)) u_lbuf (
    .clk,
    .wr_en(lane_wr), .wr_addr(lane_col), .wr_data(lane_rgb),
    .rd_en(avs_lb_read), .rd_addr(avs_lb_address), .rd_data(lb_data)
  );

  assign avs_lb_readdata = {8'd0, lb_data};

  // the scheduler finishes a row exactly when it stops being busy
  a_done_idle: assert property (@(posedge clk) disable iff (rst) row_done |-> !sched_busy);
endmodule
