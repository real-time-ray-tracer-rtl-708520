// tb_fp_mul: random and corner-case test of the Q13.10 multiplier against a
// 64-bit integer model: floor(a*b / 1024), saturated to 24 bits.
module tb_fp_mul;
  import rt_pkg::*;
  fix_t a, b, p;
  int checks = 0, failures = 0;

  fp_mul dut (.a, .b, .p);

  function automatic fix_t model(fix_t x, fix_t y);
    longint prod, q;
    prod = longint'(x) * longint'(y);
    q = prod >>> 10;
    if (q > 8388607)  return 24'sh7fffff;
    if (q < -8388608) return 24'sh800000;
    return fix_t'(q);
  endfunction

  task automatic one(fix_t x, fix_t y);
    a = x; b = y;
    #1;
    checks++;
    if (p !== model(x, y)) begin
      failures++;
      $display("FAIL %0d * %0d = %0d expected %0d", x, y, p, model(x, y));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    one(24'sd1024, 24'sd1024);      // 1 * 1
    one(-24'sd1536, 24'sd2048);     // -1.5 * 2
    one(24'sd5, -24'sd3);           // tiny negative rounds down
    one(24'sh7fffff, 24'sh7fffff);  // saturate high
    one(24'sh800000, 24'sh7fffff);  // saturate low
    for (int i = 0; i < 2000; i++) begin
      if (i < 1000) one(fix_t'($urandom), fix_t'($urandom));
      else          one(fix_t'($signed($urandom_range(0, 200000)) - 100000),
                        fix_t'($signed($urandom_range(0, 200000)) - 100000));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
