// tb_rt_shadow_stage: stage S4 is fed the floating-point S3 results of random
// pixels (object, colour terms, secondary ray, rounded to Q13.10) under a
// randomly stalling line buffer. Away from edges the packed RGB888 pixel
// must be within 8 per channel of the floating-point trace and col_addr
// must equal pixel_x. Lit and shadowed floor, sphere reflecting floor and
// sky, and sky pixels must all occur. One pixel must take LAT cycles.
module tb_rt_shadow_stage;
  import rt_pkg::*;
  import rt_ref_pkg::*;
  localparam int N = 120;
  localparam int LAT = 58;
  localparam int TOL = 8;
  logic          clk = 0, rst = 1;
  logic          s4_vld = 0, s4_rdy, wr_vld, wr_rdy = 0;
  logic [XW-1:0] in_x = '0, col_addr;
  obj_id_t       in_obj = OBJ_MISS;
  vec3_t         in_ca = '0, in_cb = '0, in_so = '0, in_sd = '0;
  logic [23:0]   rgb;
  int checks = 0, failures = 0, n_out = 0;
  int n_lit = 0, n_shadow = 0, n_rfloor = 0, n_rsky = 0, n_sky = 0;
  ref_pix_t exp_q[$];
  int       x_q[$];
  longint cyc = 0, t_acc = 0, t_vld = 0;

  rt_shadow_stage dut (.clk, .rst, .s4_vld, .s4_rdy, .in_pixel_x(in_x), .in_obj_id(in_obj),
                       .in_color_a(in_ca), .in_color_b(in_cb), .in_sec_origin(in_so),
                       .in_sec_dir(in_sd), .wr_vld, .wr_rdy, .col_addr, .rgb888(rgb));
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && wr_vld && t_vld == 0) begin
    t_vld = cyc;
    $display("first result %0d cycles after acceptance", t_vld - t_acc);
    check(t_vld - t_acc == LAT, "latency of S4");
  end

  always @(negedge clk) if (!rst) wr_rdy = ($urandom_range(0, 2) == 0);
  always @(posedge clk) begin
    if (!rst && wr_vld && wr_rdy) begin
      ref_pix_t p;
      int x;
      p = exp_q.pop_front();
      x = x_q.pop_front();
      check(col_addr == XW'(x), "col_addr is pixel_x");
      if (!p.fragile) begin
        check(iabs(int'(rgb[23:16]) - p.r) <= TOL && iabs(int'(rgb[15:8]) - p.g) <= TOL &&
              iabs(int'(rgb[7:0]) - p.b) <= TOL,
              $sformatf("pixel %06h expected %02h%02h%02h obj %0d", rgb, p.r, p.g, p.b, p.obj));
        if (p.obj == 0) n_sky++;
        if (p.obj == 1 && p.shadow) n_shadow++;
        if (p.obj == 1 && !p.shadow) n_lit++;
        if (p.obj == 2 && p.refl_floor) n_rfloor++;
        if (p.obj == 2 && !p.refl_floor) n_rsky++;
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
      // sky, the sphere, and the shadow region to its right
      case (i % 4)
        0: begin x = $urandom_range(0, 479); y = $urandom_range(0, 359); end
        1: begin x = $urandom_range(170, 310); y = $urandom_range(145, 290); end
        default: begin x = $urandom_range(240, 400); y = $urandom_range(220, 300); end
      endcase
      p = trace(x, y, rvv(light));
      @(negedge clk);
      in_x = XW'(x); in_obj = obj_id_t'(p.obj); in_ca = fv(p.ca); in_cb = fv(p.cb);
      in_so = fv(p.so); in_sd = fv(p.sd);
      s4_vld = 1;
      @(posedge clk);
      while (!s4_rdy) @(posedge clk);
      if (i == 0) t_acc = cyc;
      exp_q.push_back(p); x_q.push_back(x);
      @(negedge clk);
      s4_vld = 0;
    end
    wait (n_out == N);
    $display("sky %0d lit %0d shadow %0d refl-floor %0d refl-sky %0d", n_sky, n_lit, n_shadow, n_rfloor, n_rsky);
    check(n_sky > 0 && n_lit > 0 && n_shadow > 0 && n_rfloor > 0 && n_rsky > 0, "every case seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
