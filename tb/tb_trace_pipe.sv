// tb_trace_pipe: stages S2 to S4 of one lane are fed floating-point camera rays
// for a stream of random pixels, offered back to back so that several are in
// flight and stages stall on each other, with a randomly stalling writer at
// the output. Every pixel must come out once, in order, with col_addr equal
// to its column and, away from edges, within 8 per channel of the
// floating-point trace. A stage must be seen holding its output while its
// successor is busy.
module tb_trace_pipe;
  import rt_pkg::*;
  import rt_ref_pkg::*;
  localparam int N = 40;
  localparam int TOL = 8;
  logic          clk = 0, rst = 1;
  logic          vld = 0, rdy, wr_vld, wr_rdy = 0;
  logic [XW-1:0] in_x = '0, col_addr;
  int            in_y = 0;
  logic [23:0]   rgb;
  vec3_t         light = '{x: -24'sd3072, y: 24'sd4096, z: -24'sd3072};
  ref_pix_t      p_in;
  int checks = 0, failures = 0, n_out = 0, n_stall = 0;
  ref_pix_t exp_q[$];
  int       x_q[$];

  trace_pipe dut (.clk, .rst, .s2_vld(vld), .s2_rdy(rdy), .pixel_x(in_x), .ray_dir(fv(p_in.d)), .light(light),
          .wr_vld, .wr_rdy, .col_addr, .rgb888(rgb));
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a stage holding a finished pixel because the next one is busy
  always @(posedge clk) if (!rst && dut.s2_vld && !dut.s2_rdy) n_stall++;

  always @(negedge clk) if (!rst) wr_rdy = ($urandom_range(0, 3) != 0);
  always @(posedge clk) begin
    if (!rst && wr_vld && wr_rdy) begin
      ref_pix_t p;
      int x;
      p = exp_q.pop_front();
      x = x_q.pop_front();
      check(col_addr == XW'(x), $sformatf("col_addr %0d expected %0d", col_addr, x));
      if (!p.fragile)
        check(iabs(int'(rgb[23:16]) - p.r) <= TOL && iabs(int'(rgb[15:8]) - p.g) <= TOL &&
              iabs(int'(rgb[7:0]) - p.b) <= TOL,
              $sformatf("pixel %0d %06h expected %02h%02h%02h obj %0d", x, rgb, p.r, p.g, p.b, p.obj));
      n_out++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) begin
      int x, y;
      x = $urandom_range(0, 479);
      y = (i % 4 == 0) ? $urandom_range(0, 359) : $urandom_range(145, 300);
      p_in = trace(x, y, rvv(light));
      @(negedge clk);
      in_x = XW'(x); in_y = y;
      vld = 1;
      @(posedge clk);
      while (!rdy) @(posedge clk);
      exp_q.push_back(p_in); x_q.push_back(x);
      @(negedge clk);
      vld = 0;
    end
    wait (n_out == N);
    check(n_stall > 0, "a stage stalled on its successor");
    check(exp_q.size() == 0, "no extra pixels");
    $display("stall cycles %0d", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
