// tb_vec3_dot: random test of the dot product against an integer model that
// truncates each product like the multiplier and saturates the sum.
module tb_vec3_dot;
  import rt_pkg::*;
  vec3_t a, b;
  fix_t  d;
  int checks = 0, failures = 0;

  vec3_dot dut (.a, .b, .d);

  function automatic longint pm(fix_t x, fix_t y);
    longint q;
    q = (longint'(x) * longint'(y)) >>> 10;
    if (q > 8388607)  q = 8388607;
    if (q < -8388608) q = -8388608;
    return q;
  endfunction

  function automatic fix_t model(vec3_t x, vec3_t y);
    longint s;
    s = pm(x.x, y.x) + pm(x.y, y.y) + pm(x.z, y.z);
    if (s > 8388607)  return 24'sh7fffff;
    if (s < -8388608) return 24'sh800000;
    return fix_t'(s);
  endfunction

  function automatic fix_t rnd(int range);
    return fix_t'($signed($urandom_range(0, 2 * range)) - range);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int r;
      r = (i < 2000) ? 20000 : 8388607;
      a = '{x: rnd(r), y: rnd(r), z: rnd(r)};
      b = '{x: rnd(r), y: rnd(r), z: rnd(r)};
      #1;
      checks++;
      if (d !== model(a, b)) begin
        failures++;
        $display("FAIL dot = %0d expected %0d", d, model(a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
