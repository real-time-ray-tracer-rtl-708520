// tb_rt_shade_stage: stage S3 is fed the floating-point S2 results of random
// pixels (object, hit point, normal, ray, light, rounded to Q13.10) under a
// randomly stalling consumer. Away from edges, color_a (ambient or sky),
// color_b (diffuse) and the secondary direction (toward the light for the
// floor, mirror direction for the sphere) must be within 0.03 of the
// floating-point values; object id, pixel_x and the secondary origin must
// pass exactly. One pixel must take LAT cycles. The light alternates between
// a point in front of the sphere and one behind it, so that sphere pixels
// facing away from the light (n.l below zero, clamped) occur.
module tb_rt_shade_stage;
  import rt_pkg::*;
  import rt_ref_pkg::*;
  localparam int N = 120;
  localparam int LAT = 58;
  logic          clk = 0, rst = 1;
  logic          s3_vld = 0, s3_rdy, s4_vld, s4_rdy = 0;
  logic [XW-1:0] in_x = '0, out_x;
  obj_id_t       in_obj = OBJ_MISS, out_obj;
  vec3_t         in_hp = '0, in_n = '0, in_d = '0, in_l = '0;
  vec3_t         ca, cb, so, sd;
  int checks = 0, failures = 0, n_out = 0;
  int n_obj[3] = '{0, 0, 0};
  int n_dark = 0;
  ref_pix_t exp_q[$];
  int       x_q[$];
  longint cyc = 0, t_acc = 0, t_vld = 0;

  rt_shade_stage dut (.clk, .rst, .s3_vld, .s3_rdy, .in_pixel_x(in_x), .in_obj_id(in_obj),
                      .in_hit_point(in_hp), .in_normal(in_n), .in_ray_dir(in_d), .in_light(in_l),
                      .s4_vld, .s4_rdy, .out_pixel_x(out_x), .out_obj_id(out_obj),
                      .out_color_a(ca), .out_color_b(cb), .out_sec_origin(so), .out_sec_dir(sd));
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && s4_vld && t_vld == 0) begin
    t_vld = cyc;
    $display("first result %0d cycles after acceptance", t_vld - t_acc);
    check(t_vld - t_acc == LAT, "latency of S3");
  end

  always @(negedge clk) if (!rst) s4_rdy = ($urandom_range(0, 2) == 0);
  always @(posedge clk) begin
    if (!rst && s4_vld && s4_rdy) begin
      ref_pix_t p;
      int x;
      p = exp_q.pop_front();
      x = x_q.pop_front();
      check(out_x == XW'(x), "pixel_x passes through");
      check(int'(out_obj) == p.obj, "obj_id passes through");
      check(so == fv(p.so) || p.obj == 0, "secondary origin is the hit point");
      if (!p.fragile) begin
        n_obj[p.obj]++;
        if (p.obj == 2 && p.cb.z == 0.0) n_dark++;
        check(verr(rvv(ca), p.ca) < 0.03, $sformatf("color_a (%f %f %f) expected (%f %f %f) obj %0d",
              rvv(ca).x, rvv(ca).y, rvv(ca).z, p.ca.x, p.ca.y, p.ca.z, p.obj));
        check(verr(rvv(cb), p.cb) < 0.03, $sformatf("color_b (%f %f %f) expected (%f %f %f) obj %0d",
              rvv(cb).x, rvv(cb).y, rvv(cb).z, p.cb.x, p.cb.y, p.cb.z, p.obj));
        if (p.obj != 0)
          check(verr(rvv(sd), p.sd) < 0.03, $sformatf("sec_dir (%f %f %f) expected (%f %f %f) obj %0d",
                rvv(sd).x, rvv(sd).y, rvv(sd).z, p.sd.x, p.sd.y, p.sd.z, p.obj));
      end
      n_out++;
    end
  end

  initial begin
    vec3_t light, light_f, light_b;
    light_f = '{x: -24'sd3072, y: 24'sd4096, z: -24'sd3072};   // in front, (-3, 4, -3)
    light_b = '{x: 24'sd2048,  y: 24'sd3072, z: 24'sd2560};    // behind, (2, 3, 2.5)
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) begin
      int x, y;
      ref_pix_t p;
      light = (i % 2 == 0) ? light_f : light_b;
      x = $urandom_range(0, 479);
      y = (i % 3 == 0) ? $urandom_range(0, 359) : $urandom_range(140, 300);
      p = trace(x, y, rvv(light));
      @(negedge clk);
      in_x = XW'(x); in_obj = obj_id_t'(p.obj); in_hp = fv(p.hp); in_n = fv(p.n);
      in_d = fv(p.d); in_l = light;
      s3_vld = 1;
      @(posedge clk);
      while (!s3_rdy) @(posedge clk);
      if (i == 0) t_acc = cyc;
      exp_q.push_back(p); x_q.push_back(x);
      @(negedge clk);
      s3_vld = 0;
    end
    wait (n_out == N);
    $display("sky %0d floor %0d sphere %0d", n_obj[0], n_obj[1], n_obj[2]);
    $display("sphere pixels facing away from the light %0d", n_dark);
    check(n_obj[0] > 0 && n_obj[1] > 0 && n_obj[2] > 0, "all three object classes seen");
    check(n_dark > 0, "a sphere pixel facing away from the light seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
