// tb_intersect_sphere: rays from the camera eye and from random points on the
// floor are tested against the unit sphere and compared with a
// floating-point solution (hit flag, and t within 2% + 0.02); rays that
// only graze the sphere are skipped. Every result must arrive 55 cycles
// after start, the sphere-intersect latency the design is built around.
module tb_intersect_sphere;
  import rt_pkg::*;
  import rt_ref_pkg::*;
  localparam int LAT = 55;
  logic  clk = 0, rst = 1, start = 0, busy, done, hit;
  vec3_t o = '0, d = '0;
  fix_t  t;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;

  intersect_sphere dut (.clk, .rst, .start, .o, .d, .busy, .done, .hit, .t);
  always #5 clk = ~clk;

  task automatic one(rvec_t ro, rvec_t rd);
    int c;
    real et, disc;
    bit eh;
    vec3_t fo, fd;
    fo = fv(ro); fd = fv(rd);
    @(negedge clk);
    o = fo; d = fd; start = 1;
    @(negedge clk);
    start = 0;
    o = '0; d = '0;
    c = 1;
    while (!done && c < 200) begin
      @(negedge clk);
      c++;
    end
    eh = sphere_hit(rvv(fo), rvv(fd), et, disc);
    checks++;
    if (c != LAT) begin
      failures++;
      $display("FAIL latency %0d", c);
    end
    if (rabs(disc) > 0.03) begin
      checks++;
      if (hit != eh || (eh && rabs(fr(t) - et) > 0.02 + 0.02 * et)) begin
        failures++;
        $display("FAIL hit %0d t %f expected %0d %f o=(%f %f %f) d=(%f %f %f)", hit, fr(t), eh, et, ro.x, ro.y, ro.z, rd.x, rd.y, rd.z);
      end
      if (eh) n_hit++; else n_miss++;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      rvec_t ro, rd;
      if (i % 2 == 0) begin
        ro = rvv(CAM_EYE);
        rd = ray_dir($urandom_range(120, 360), $urandom_range(100, 330));
      end else begin
        ro.x = real'($urandom_range(0, 8000)) / 1000.0 - 4.0;
        ro.y = 0.02;
        ro.z = real'($urandom_range(0, 8000)) / 1000.0 - 4.0;
        rd.x = real'($urandom_range(0, 2000)) / 1000.0 - 1.0;
        rd.y = real'($urandom_range(0, 1000)) / 1000.0 + 0.05;
        rd.z = real'($urandom_range(0, 2000)) / 1000.0 - 1.0;
        rd = unit(rd);
      end
      one(ro, rd);
    end
    $display("hits %0d misses %0d", n_hit, n_miss);
    checks++;
    if (n_hit < 20 || n_miss < 20) begin
      failures++;
      $display("FAIL too few hits or misses");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
