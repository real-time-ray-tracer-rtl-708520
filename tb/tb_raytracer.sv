// tb_raytracer: end-to-end test of the accelerator at its default size.
//
// Acts as the host driver: for each test row it writes ROW_Y and LIGHT_X/Y/Z,
// clears done, writes start, polls STATUS until done, then reads all 480
// pixels back through the line-buffer slave and compares each with the
// floating-point reference model (rt_ref_pkg). Pixels away from edges must
// match within +-8 per channel; pixels on an edge (silhouette, checker line,
// shadow edge) are counted but allowed to differ. It also checks the status
// protocol (busy while rendering, sticky done, clear_done, start clearing
// done, start ignored while busy), that the six lanes deliver their pixels
// together (80 six-pixel write cycles per row), and that every mechanism
// occurred: sky, lit floor, shadowed floor, sphere reflecting the floor and
// the sky, and a stage stalled by a busy successor.
module tb_raytracer;
  import rt_pkg::*;
  import rt_ref_pkg::*;

  localparam int TOL = 8;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [2:0]  c_addr = '0;
  logic        c_write = 1'b0, c_read = 1'b0;
  logic [31:0] c_wdata = '0, c_rdata;
  logic [8:0]  lb_addr = '0;
  logic        lb_read = 1'b0;
  logic [31:0] lb_rdata;

  int checks = 0, failures = 0;
  int n_sky = 0, n_lit = 0, n_shadow = 0, n_refl_floor = 0, n_refl_sky = 0;
  int n_stall = 0, n_full_batch = 0, n_fragile = 0, n_fragile_diff = 0;
  longint cyc = 0;

  raytracer dut (
    .clk, .rst,
    .avs_ctrl_address(c_addr), .avs_ctrl_write(c_write), .avs_ctrl_writedata(c_wdata),
    .avs_ctrl_read(c_read), .avs_ctrl_readdata(c_rdata),
    .avs_lb_address(lb_addr), .avs_lb_read(lb_read), .avs_lb_readdata(lb_rdata)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // S1 of lane 0 holding its output while S2 is busy
  always @(posedge clk)
    if (!rst && dut.g_lane[0].u_pipe.s2_vld && !dut.g_lane[0].u_pipe.s2_rdy) n_stall++;
  always @(posedge clk)
    if (!rst && (&dut.lane_wr)) n_full_batch++;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk);
    c_addr = a; c_wdata = d; c_write = 1'b1;
    @(negedge clk);
    c_write = 1'b0;
  endtask

  task automatic rd(input logic [2:0] a, output logic [31:0] d);
    @(negedge clk);
    c_addr = a; c_read = 1'b1;
    @(negedge clk);
    c_read = 1'b0;
    d = c_rdata;
  endtask

  task automatic lb_rd(input int x, output logic [31:0] d);
    @(negedge clk);
    lb_addr = 9'(x); lb_read = 1'b1;
    @(negedge clk);
    lb_read = 1'b0;
    d = lb_rdata;
  endtask

  task automatic run_row(input int y, input vec3_t light);
    logic [31:0] st, d;
    longint t0;
    int full0;
    rvec_t lr;
    ref_pix_t p;
    bit ok;
    wr(3'd2, 32'(y));
    wr(3'd3, {8'd0, light.x});
    wr(3'd4, {8'd0, light.y});
    wr(3'd5, {8'd0, light.z});
    rd(3'd3, d);
    check(d[23:0] == light.x, "LIGHT_X read back");
    rd(3'd2, d);
    check(d == 32'(y), "ROW_Y read back");
    wr(3'd0, 32'h2);                         // clear stale done
    rd(3'd1, st);
    check(st == 32'h0, "STATUS idle after clear_done");
    full0 = n_full_batch;
    t0 = cyc;
    wr(3'd0, 32'h1);                         // start
    rd(3'd1, st);
    check(st == 32'h1, "STATUS busy after start");
    wr(3'd0, 32'h1);                         // start while busy is ignored
    rd(3'd1, st);
    check(st == 32'h1, "STATUS still busy");
    do rd(3'd1, st); while (st[1] == 1'b0);
    check(st == 32'h2, "STATUS done and not busy");
    $display("row %0d rendered in %0d cycles", y, cyc - t0);
    check(n_full_batch - full0 == IMG_W / 6, "six lanes write together, 80 batches per row");
    rd(3'd1, st);
    check(st == 32'h2, "done is sticky");
    lr = rvv(light);
    for (int x = 0; x < IMG_W; x++) begin
      lb_rd(x, d);
      p = trace(x, y, lr);
      ok = (d[31:24] == 8'd0) &&
           (iabs(int'(d[23:16]) - p.r) <= TOL) &&
           (iabs(int'(d[15:8])  - p.g) <= TOL) &&
           (iabs(int'(d[7:0])   - p.b) <= TOL);
      if (p.fragile) begin
        n_fragile++;
        if (!ok) n_fragile_diff++;
      end else begin
        check(ok, $sformatf("pixel (%0d,%0d) got %06h expected %02h%02h%02h obj %0d",
                            x, y, d[23:0], p.r, p.g, p.b, p.obj));
        if (ok) begin
          if (p.obj == 0) n_sky++;
          if (p.obj == 1 && !p.shadow) n_lit++;
          if (p.obj == 1 && p.shadow) n_shadow++;
          if (p.obj == 2 && p.refl_floor) n_refl_floor++;
          if (p.obj == 2 && !p.refl_floor) n_refl_sky++;
        end
      end
    end
    wr(3'd0, 32'h2);                         // clear_done
    rd(3'd1, st);
    check(st == 32'h0, "clear_done clears done");
  endtask

  initial begin
    vec3_t light;
    logic [31:0] st;
    light.x = -24'sd3072;                    // light at (-3, 4, -3)
    light.y = 24'sd4096;
    light.z = -24'sd3072;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    run_row(100, light);
    run_row(200, light);
    run_row(270, light);
    // start clears a pending done
    wr(3'd0, 32'h1);
    rd(3'd1, st);
    check(st == 32'h1, "start clears done");
    do rd(3'd1, st); while (st[1] == 1'b0);
    run_row(330, light);
    $display("mechanisms: sky %0d lit-floor %0d shadow %0d refl-floor %0d refl-sky %0d stall-cycles %0d",
             n_sky, n_lit, n_shadow, n_refl_floor, n_refl_sky, n_stall);
    $display("edge pixels %0d, of which differing %0d", n_fragile, n_fragile_diff);
    check(n_sky > 0, "sky pixel seen");
    check(n_lit > 0, "lit floor pixel seen");
    check(n_shadow > 0, "shadowed floor pixel seen");
    check(n_refl_floor > 0, "sphere reflecting floor seen");
    check(n_refl_sky > 0, "sphere reflecting sky seen");
    check(n_stall > 0, "S1 stalled on S2 at least once");
    check(n_fragile_diff * 2 <= n_fragile, "most edge pixels still match");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
