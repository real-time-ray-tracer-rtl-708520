// tb_fp_sqrt: random test of the bit-serial square root against an integer
// model, floor(sqrt(x*1024)), with negative inputs giving 0, and a check
// that each result arrives exactly 18 cycles after start.
module tb_fp_sqrt;
  import rt_pkg::*;
  localparam int LAT = 18;
  logic clk = 0, rst = 1, start = 0, busy, done;
  fix_t x = '0, r;
  int checks = 0, failures = 0;

  fp_sqrt dut (.clk, .rst, .start, .x, .busy, .done, .r);
  always #5 clk = ~clk;

  function automatic fix_t model(fix_t v);
    longint n, s;
    if (v < 0) return '0;
    n = longint'(v) * 1024;
    s = longint'($floor($sqrt(real'(n))));
    while (s * s > n) s--;
    while ((s + 1) * (s + 1) <= n) s++;
    return fix_t'(s);
  endfunction

  task automatic one(fix_t v);
    int n;
    @(negedge clk);
    x = v; start = 1;
    @(negedge clk);
    start = 0;
    x = '0;
    n = 1;
    while (!done && n < 100) begin
      @(negedge clk);
      n++;
    end
    checks += 2;
    if (r !== model(v)) begin
      failures++;
      $display("FAIL sqrt(%0d) = %0d expected %0d", v, r, model(v));
    end
    if (n != LAT) begin
      failures++;
      $display("FAIL latency %0d", n);
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
    one(24'sd4096);                 // sqrt(4) = 2
    one(24'sd1024);                 // sqrt(1) = 1
    one(24'sd0);
    one(-24'sd5);
    one(24'sh7fffff);
    for (int i = 0; i < 600; i++) one(fix_t'($urandom_range(0, 24'h7fffff)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
