// tb_rt_norm_stage: random vectors of length 0.5 to 60 are normalized and
// compared with a floating-point unit vector (error at most 0.006 per
// component plus the input's own rounding), and every result must arrive
// exactly LAT cycles after start.
module tb_rt_norm_stage;
  import rt_pkg::*;
  import rt_ref_pkg::*;
  localparam int LAT = 56;
  logic  clk = 0, rst = 1, start = 0, busy, done;
  vec3_t v = '0, n;
  int checks = 0, failures = 0;

  rt_norm_stage dut (.clk, .rst, .start, .v, .busy, .done, .n);
  always #5 clk = ~clk;

  task automatic one(vec3_t vin);
    int c;
    rvec_t e, g;
    real err;
    @(negedge clk);
    v = vin; start = 1;
    @(negedge clk);
    start = 0;
    v = '0;
    c = 1;
    while (!done && c < 200) begin
      @(negedge clk);
      c++;
    end
    e = unit(rvv(vin));
    g = rvv(n);
    err = rabs(e.x - g.x) + rabs(e.y - g.y) + rabs(e.z - g.z);
    checks += 2;
    if (err > 0.018) begin
      failures++;
      $display("FAIL norm (%f %f %f) -> (%f %f %f) err %f", rvv(vin).x, rvv(vin).y, rvv(vin).z, g.x, g.y, g.z, err);
    end
    if (c != LAT) begin
      failures++;
      $display("FAIL latency %0d", c);
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
    one('{x: 24'sd3072, y: 24'sd4096, z: 24'sd0});   // (3,4,0) -> (0.6,0.8,0)
    one('{x: 24'sd0, y: -24'sd1024, z: 24'sd0});
    for (int i = 0; i < 300; i++) begin
      rvec_t r;
      real len;
      r.x = real'($signed($urandom_range(0, 2000))) / 1000.0 - 1.0;
      r.y = real'($signed($urandom_range(0, 2000))) / 1000.0 - 1.0;
      r.z = real'($signed($urandom_range(0, 2000))) / 1000.0 - 1.0;
      if (dot(r, r) < 0.01) r.x = 0.5;
      len = 0.5 + real'($urandom_range(0, 1000)) / 1000.0 * ((i % 3 == 0) ? 60.0 : 3.0);
      one(fv(scl(unit(r), len)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
