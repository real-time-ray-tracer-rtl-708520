// tb_intersect_plane: camera rays and random rays from points above the
// floor are tested against the plane y = 0 and compared with a
// floating-point solution (hit flag, t within 3% + 0.02); near-horizontal
// rays are skipped. Every result must arrive 37 cycles after start.
module tb_intersect_plane;
  import rt_pkg::*;
  import rt_ref_pkg::*;
  localparam int LAT = 37;
  logic  clk = 0, rst = 1, start = 0, busy, done, hit;
  vec3_t o = '0, d = '0;
  fix_t  t;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;

  intersect_plane dut (.clk, .rst, .start, .o, .d, .busy, .done, .hit, .t);
  always #5 clk = ~clk;

  task automatic one(rvec_t ro, rvec_t rd);
    int c;
    real et;
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
    eh = plane_hit(rvv(fo), rvv(fd), et);
    checks++;
    if (c != LAT) begin
      failures++;
      $display("FAIL latency %0d", c);
    end
    if (rabs(fr(fd.y)) > 0.03) begin
      checks++;
      if (hit != eh || (eh && rabs(fr(t) - et) > 0.02 + 0.03 * et)) begin
        failures++;
        $display("FAIL hit %0d t %f expected %0d %f", hit, fr(t), eh, et);
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
        rd = ray_dir($urandom_range(0, 479), $urandom_range(0, 359));
      end else begin
        ro.x = real'($urandom_range(0, 8000)) / 1000.0 - 4.0;
        ro.y = real'($urandom_range(0, 3000)) / 1000.0 + 0.01;
        ro.z = real'($urandom_range(0, 8000)) / 1000.0 - 4.0;
        rd.x = real'($urandom_range(0, 2000)) / 1000.0 - 1.0;
        rd.y = real'($urandom_range(0, 2000)) / 1000.0 - 1.0;
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
