// tb_rt_ray_stage: pixels from all over the frame go through stage S1 with a
// randomly stalling consumer. Each output ray direction must be within 0.006
// (sum of component errors) of the floating-point unit ray of its pixel;
// pixel_x and the light must pass through unchanged and in order. The stage
// must not accept a new pixel while it holds one, and one pixel must take
// 59 cycles from acceptance to s2_vld.
module tb_rt_ray_stage;
  import rt_pkg::*;
  import rt_ref_pkg::*;
  localparam int N = 60;
  localparam int LAT = 59;
  logic          clk = 0, rst = 1;
  logic          s1_vld = 0, s1_rdy, s2_vld, s2_rdy = 0;
  logic [XW-1:0] in_x = '0, out_x;
  logic [YW-1:0] in_y = '0;
  vec3_t         in_l = '0, out_d, out_l;
  int checks = 0, failures = 0;
  int xs[$], ys[$];
  vec3_t ls[$];
  int n_out = 0, n_stall = 0;
  longint cyc = 0, t_acc = 0;

  rt_ray_stage dut (.clk, .rst, .s1_vld, .s1_rdy, .in_pixel_x(in_x), .in_pixel_y(in_y),
                    .in_light(in_l), .s2_vld, .s2_rdy, .out_pixel_x(out_x),
                    .out_ray_dir(out_d), .out_light(out_l));
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer: random ready, compares in order
  always @(negedge clk) if (!rst) s2_rdy = ($urandom_range(0, 3) == 0);
  longint t_vld = 0;
  always @(posedge clk) if (!rst && s2_vld && t_vld == 0) begin
    t_vld = cyc;
    $display("first result %0d cycles after acceptance", t_vld - t_acc);
    check(t_vld - t_acc == LAT, "latency of S1");
  end
  always @(posedge clk) begin
    if (!rst && s2_vld && !s2_rdy) n_stall++;
    if (!rst && s2_vld && s2_rdy) begin
      int x, y;
      vec3_t l;
      x = xs.pop_front(); y = ys.pop_front(); l = ls.pop_front();
      check(out_x == XW'(x), "pixel_x passes through");
      check(out_l == l, "light passes through");
      check(verr(rvv(out_d), ray_dir(x, y)) < 0.006,
            $sformatf("ray (%0d,%0d) got (%f %f %f)", x, y, rvv(out_d).x, rvv(out_d).y, rvv(out_d).z));
      n_out++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) begin
      int x, y;
      x = (i == 0) ? 0 : (i == 1) ? 479 : $urandom_range(0, 479);
      y = (i == 0) ? 0 : (i == 1) ? 359 : $urandom_range(0, 359);
      @(negedge clk);
      in_x = XW'(x); in_y = YW'(y);
      in_l = '{x: fix_t'($urandom), y: fix_t'($urandom), z: fix_t'($urandom)};
      s1_vld = 1;
      @(posedge clk);
      while (!s1_rdy) @(posedge clk);
      if (i == 0) t_acc = cyc;
      xs.push_back(x); ys.push_back(y); ls.push_back(in_l);
      @(negedge clk);
      s1_vld = 0;
      check(!s1_rdy, "busy after accepting");
    end
    wait (n_out == N);
    check(n_stall > 0, "output held under back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
