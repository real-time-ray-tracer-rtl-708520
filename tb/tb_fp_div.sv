// tb_fp_div: random test of the bit-serial divider against an integer model
// (|a|*1024 / |b| truncated, sign applied, saturated) and a check that every
// result arrives exactly 35 cycles after start.
module tb_fp_div;
  import rt_pkg::*;
  localparam int LAT = 35;
  logic clk = 0, rst = 1, start = 0, busy, done;
  fix_t a = '0, b = '0, q;
  int checks = 0, failures = 0;

  fp_div dut (.clk, .rst, .start, .a, .b, .busy, .done, .q);
  always #5 clk = ~clk;

  function automatic fix_t model(fix_t x, fix_t y);
    longint ax, ay, m;
    bit neg;
    ax  = (x < 0) ? -longint'(x) : longint'(x);
    ay  = (y < 0) ? -longint'(y) : longint'(y);
    neg = (x < 0) ^ (y < 0);
    if (ay == 0) return neg ? 24'sh800000 : 24'sh7fffff;
    m = (ax * 1024) / ay;
    if (m > 8388607) return neg ? 24'sh800000 : 24'sh7fffff;
    return neg ? fix_t'(-m) : fix_t'(m);
  endfunction

  task automatic one(fix_t x, fix_t y);
    int n;
    @(negedge clk);
    a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    a = '0; b = '0;
    n = 1;
    while (!done && n < 100) begin
      @(negedge clk);
      n++;
    end
    checks += 2;
    if (q !== model(x, y)) begin
      failures++;
      $display("FAIL %0d / %0d = %0d expected %0d", x, y, q, model(x, y));
    end
    if (n != LAT) begin
      failures++;
      $display("FAIL latency %0d", n);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    one(24'sd1024, 24'sd2048);      // 1 / 2
    one(-24'sd3072, 24'sd1024);     // -3 / 1
    one(24'sd7, 24'sd0);            // divide by zero
    one(24'sd8000000, 24'sd10);     // overflow
    one(-24'sd1000, -24'sd3000);
    for (int i = 0; i < 400; i++) begin
      fix_t x, y;
      x = fix_t'($urandom);
      y = (i % 2 == 0) ? fix_t'($urandom) : fix_t'($signed($urandom_range(0, 40000)) - 20000);
      one(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
