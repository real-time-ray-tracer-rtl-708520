// tb_rt_isect_stage: camera rays of random pixels (computed in floating
// point and rounded to Q13.10) go through stage S2 with a randomly stalling
// consumer. Away from edges the object id must match the floating-point
// trace, the hit point must be within 0.03 + 0.0005*t^2 of the true one and
// the sphere normal within 0.03; the plane normal must be exactly (0,1,0).
// pass-through fields must be unchanged, the latency of one pixel must be
// LAT cycles, and sky, floor and sphere must all have been seen.
module tb_rt_isect_stage;
  import rt_pkg::*;
  import rt_ref_pkg::*;
  localparam int N = 80;
  localparam int LAT = 114;
  logic          clk = 0, rst = 1;
  logic          s2_vld = 0, s2_rdy, s3_vld, s3_rdy = 0;
  logic [XW-1:0] in_x = '0, out_x;
  vec3_t         in_d = '0, in_l = '0, out_hp, out_n, out_d, out_l;
  obj_id_t       out_obj;
  int checks = 0, failures = 0;
  int n_out = 0, n_obj[3] = '{0, 0, 0};
  ref_pix_t exp_q[$];
  vec3_t    din_q[$];
  longint cyc = 0, t_acc = 0, t_vld = 0;

  rt_isect_stage dut (.clk, .rst, .s2_vld, .s2_rdy, .in_pixel_x(in_x), .in_ray_dir(in_d),
                      .in_light(in_l), .s3_vld, .s3_rdy, .out_pixel_x(out_x), .out_obj_id(out_obj),
                      .out_hit_point(out_hp), .out_normal(out_n), .out_ray_dir(out_d),
                      .out_light(out_l));
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

  always @(posedge clk) if (!rst && s3_vld && t_vld == 0) begin
    t_vld = cyc;
    $display("first result %0d cycles after acceptance", t_vld - t_acc);
    check(t_vld - t_acc == LAT, "latency of S2");
  end

  always @(negedge clk) if (!rst) s3_rdy = ($urandom_range(0, 2) == 0);
  always @(posedge clk) begin
    if (!rst && s3_vld && s3_rdy) begin
      ref_pix_t p;
      vec3_t    din;
      real      t;
      p = exp_q.pop_front();
      din = din_q.pop_front();
      check(out_d == din, "ray_dir passes through");
      if (!p.fragile) begin
        check(int'(out_obj) == p.obj, $sformatf("obj %0d expected %0d", out_obj, p.obj));
        n_obj[p.obj]++;
        t = $sqrt(dot(sub(p.hp, rvv(CAM_EYE)), sub(p.hp, rvv(CAM_EYE))));
        if (p.obj != 0 && int'(out_obj) == p.obj) begin
          check(verr(rvv(out_hp), p.hp) < 0.03 + 0.0005 * t * t,
                $sformatf("hit point (%f %f %f) expected (%f %f %f)", rvv(out_hp).x, rvv(out_hp).y,
                          rvv(out_hp).z, p.hp.x, p.hp.y, p.hp.z));
          if (p.obj == 2) check(verr(rvv(out_n), p.n) < 0.03, "sphere normal");
          else            check(out_n == PLN_N, "plane normal");
        end
      end
      n_out++;
    end
  end

  initial begin
    vec3_t light;
    light = '{x: -24'sd3072, y: 24'sd4096, z: -24'sd3072};
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) begin
      int x, y;
      ref_pix_t p;
      x = $urandom_range(0, 479);
      y = (i % 3 == 0) ? $urandom_range(0, 359) : $urandom_range(140, 300);
      p = trace(x, y, rvv(light));
      @(negedge clk);
      in_x = XW'(x); in_d = fv(p.d); in_l = light;
      s2_vld = 1;
      @(posedge clk);
      while (!s2_rdy) @(posedge clk);
      if (i == 0) t_acc = cyc;
      exp_q.push_back(p); din_q.push_back(in_d);
      @(negedge clk);
      s2_vld = 0;
    end
    wait (n_out == N);
    $display("sky %0d floor %0d sphere %0d", n_obj[0], n_obj[1], n_obj[2]);
    check(n_obj[0] > 0 && n_obj[1] > 0 && n_obj[2] > 0, "all three object classes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
