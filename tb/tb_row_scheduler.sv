// tb_row_scheduler: the scheduler drives six model lanes whose readiness is
// random and which write each pixel back after a random delay. Checks: the
// batches start at x = 0, 6, ..., 474 in order, all lanes are offered the
// same batch together and only when all are ready, the row index and light
// are the ones latched at start, every column is issued once, done pulses
// exactly once and only after all 480 write-backs, busy spans the job, and
// a start while busy is ignored. Two rows are run.
module tb_row_scheduler;
  import rt_pkg::*;
  localparam int LANES = 6;
  localparam int WIDTH = 480;
  logic clk = 0, rst = 1, start = 0, busy, done, lane_vld;
  logic [YW-1:0] row_y = '0, pixel_y;
  vec3_t light = '0, lane_light;
  logic [LANES-1:0] lane_rdy = '0, lane_wr = '0;
  logic [XW-1:0] batch_x;
  int checks = 0, failures = 0;
  int expect_x = 0, n_done = 0, n_wr = 0;
  int pending[LANES][$];
  bit seen[WIDTH];

  row_scheduler #(.LANES(LANES), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

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

  // model lanes: random readiness, each accepted pixel written back 3..20 cycles later
  always @(negedge clk) begin
    for (int i = 0; i < LANES; i++) begin
      lane_rdy[i] = ($urandom_range(0, 3) != 0);
      lane_wr[i]  = 1'b0;
      if (pending[i].size() > 0 && pending[i][0] <= 0) begin
        void'(pending[i].pop_front());
        lane_wr[i] = 1'b1;
      end
      foreach (pending[i][k]) pending[i][k]--;
    end
  end

  always @(posedge clk) if (!rst) begin
    if (lane_vld) begin
      check(&lane_rdy, "batch only offered when all lanes ready");
      check(int'(batch_x) == expect_x, $sformatf("batch x %0d expected %0d", batch_x, expect_x));
      check(pixel_y == 9'd123 || pixel_y == 9'd7, "row index latched");
      check(lane_light.x == 24'sd777, "light latched");
      for (int i = 0; i < LANES; i++) begin
        check(!seen[int'(batch_x) + i], "column issued once");
        seen[int'(batch_x) + i] = 1'b1;
        pending[i].push_back($urandom_range(3, 20));
      end
      expect_x += LANES;
    end
    n_wr += $countones(lane_wr);
    if (done) begin
      n_done++;
      check(n_wr == WIDTH, $sformatf("done after %0d of %0d writes", n_wr, WIDTH));
      check(expect_x == WIDTH, "all batches issued before done");
    end
  end

  task automatic run(int y);
    @(negedge clk);
    row_y = YW'(y); light = '{x: 24'sd777, y: 24'sd1, z: 24'sd2};
    start = 1;
    @(negedge clk);
    start = 0;
    row_y = '0; light = '0;               // latched values must be used
    check(busy, "busy after start");
    repeat (5) @(negedge clk);
    start = 1;                            // ignored while busy
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run(123);
    check(n_done == 1, "one done per row");
    for (int i = 0; i < WIDTH; i++) check(seen[i], "every column issued");
    expect_x = 0; n_wr = 0;
    foreach (seen[i]) seen[i] = 1'b0;
    run(7);
    check(n_done == 2, "second row done");
    repeat (30) @(negedge clk);
    check(n_done == 2 && !busy, "no spurious done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
