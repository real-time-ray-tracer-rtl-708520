// tb_frame: renders whole 480x360 frames through the accelerator, the way
// a host does it for one frame of the animation: for y = 0..359 it writes
// ROW_Y and the light, clears done, starts the row, polls STATUS.done and
// reads the 480 pixels of the row back. Every pixel is compared with the
// floating-point reference trace (rt_ref_pkg): away from edges within 8 per
// channel, while at most half of the edge pixels of a frame may differ. Two
// frames are rendered, with the light at two points around the sphere, and
// the clock cycles per frame are reported (the accelerator's share of the
// frame time; bus and software time come on top). Each frame
// must show sky, lit floor, shadowed floor and the sphere reflecting floor
// and sky, and every row must take the same number of cycles.
module tb_frame;
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
  int n_sky, n_lit, n_shadow, n_refl_floor, n_refl_sky, n_fragile, n_fragile_diff;
  longint cyc = 0;

  raytracer dut (
    .clk, .rst,
    .avs_ctrl_address(c_addr), .avs_ctrl_write(c_write), .avs_ctrl_writedata(c_wdata),
    .avs_ctrl_read(c_read), .avs_ctrl_readdata(c_rdata),
    .avs_lb_address(lb_addr), .avs_lb_read(lb_read), .avs_lb_readdata(lb_rdata)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (12000000) @(posedge clk);
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

  // One frame; returns the cycles spent from start to done, summed over rows.
  task automatic run_frame(input vec3_t light, output longint busy_cycles);
    logic [31:0] st, d;
    longint t0, row_cyc, first_row_cyc;
    rvec_t lr;
    ref_pix_t p;
    bit ok;
    n_sky = 0; n_lit = 0; n_shadow = 0; n_refl_floor = 0; n_refl_sky = 0;
    n_fragile = 0; n_fragile_diff = 0;
    busy_cycles = 0;
    first_row_cyc = 0;
    lr = rvv(light);
    wr(3'd3, {8'd0, light.x});
    wr(3'd4, {8'd0, light.y});
    wr(3'd5, {8'd0, light.z});
    for (int y = 0; y < IMG_H; y++) begin
      wr(3'd2, 32'(y));
      wr(3'd0, 32'h2);                       // clear stale done
      t0 = cyc;
      wr(3'd0, 32'h1);                       // start
      do rd(3'd1, st); while (st[1] == 1'b0);
      row_cyc = cyc - t0;
      busy_cycles += row_cyc;
      if (y == 0) first_row_cyc = row_cyc;
      check(st == 32'h2 && row_cyc == first_row_cyc,
            $sformatf("row %0d: status %0h after %0d cycles", y, st, row_cyc));
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
    end
    $display("frame with light (%0.2f, %0.2f, %0.2f): %0d accelerator cycles (%0d per row)",
             lr.x, lr.y, lr.z, busy_cycles, first_row_cyc);
    $display("  sky %0d lit-floor %0d shadow %0d refl-floor %0d refl-sky %0d edge %0d (differing %0d)",
             n_sky, n_lit, n_shadow, n_refl_floor, n_refl_sky, n_fragile, n_fragile_diff);
    check(n_sky > 0 && n_lit > 0 && n_shadow > 0 && n_refl_floor > 0 && n_refl_sky > 0,
          "every kind of pixel occurs in the frame");
    check(n_fragile_diff * 2 <= n_fragile, "most edge pixels still match");
  endtask

  initial begin
    vec3_t light;
    longint fc;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    // light in front of the sphere at (-3, 4, -3), then behind it at
    // (2, 3, 2.5), casting the shadow toward the camera
    light.x = -24'sd3072; light.y = 24'sd4096; light.z = -24'sd3072;
    run_frame(light, fc);
    $display("  at 50 MHz: %0.1f frames/s without bus time", 50.0e6 / real'(fc));
    light.x = 24'sd2048; light.y = 24'sd3072; light.z = 24'sd2560;
    run_frame(light, fc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
