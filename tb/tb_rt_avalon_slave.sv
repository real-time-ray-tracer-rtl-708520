// tb_rt_avalon_slave: exercises the register map over the Avalon-MM port:
// ROW_Y keeps 9 bits, LIGHT_X/Y/Z keep 24 bits and read them back, STATUS
// reports busy and the sticky done, CONTROL.start gives exactly one start
// pulse carrying the programmed row and light, start is ignored while busy,
// clear_done and a new start both clear done, reserved bits read zero and
// reads take one cycle.
module tb_rt_avalon_slave;
  import rt_pkg::*;
  logic clk = 0, rst = 1;
  logic [2:0] address = '0;
  logic write = 0, read = 0;
  logic [31:0] writedata = '0, readdata;
  logic start, row_done = 0;
  logic [YW-1:0] row_y;
  vec3_t light;
  int checks = 0, failures = 0, n_start = 0;

  rt_avalon_slave dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && start) n_start++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [2:0] a, logic [31:0] d);
    @(negedge clk);
    address = a; writedata = d; write = 1;
    @(negedge clk);
    write = 0;
  endtask

  task automatic rd(logic [2:0] a, output logic [31:0] d);
    @(negedge clk);
    address = a; read = 1;
    @(negedge clk);
    read = 0;
    address = 3'd7;
    d = readdata;
  endtask

  task automatic pulse_done();
    @(negedge clk);
    row_done = 1;
    @(negedge clk);
    row_done = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (3) @(negedge clk);
    rst = 0;
    rd(3'd1, d); check(d == 32'h0, "STATUS after reset");
    wr(3'd2, 32'hFFFF_FE67); rd(3'd2, d); check(d == 32'h0000_0067, "ROW_Y keeps 9 bits");
    wr(3'd3, 32'hAB80_0001); rd(3'd3, d); check(d == 32'h0080_0001, "LIGHT_X keeps 24 bits");
    wr(3'd4, 32'h0000_1000); rd(3'd4, d); check(d == 32'h0000_1000, "LIGHT_Y");
    wr(3'd5, 32'h00FF_F000); rd(3'd5, d); check(d == 32'h00FF_F000, "LIGHT_Z");
    check(light.x == fix_t'(24'h800001) && light.y == 24'sd4096 && light.z == -24'sd4096, "light outputs");
    check(row_y == 9'h067, "row_y output");
    rd(3'd0, d); check(d == 32'h0, "CONTROL reads zero");
    rd(3'd6, d); check(d == 32'h0, "unused address reads zero");
    wr(3'd0, 32'h1);
    rd(3'd1, d); check(d == 32'h1, "busy");
    check(n_start == 1, "one start pulse");
    wr(3'd0, 32'h1);
    rd(3'd1, d);
    check(n_start == 1, "start ignored while busy");
    pulse_done();
    rd(3'd1, d); check(d == 32'h2, "done, not busy");
    rd(3'd1, d); check(d == 32'h2, "done is sticky");
    wr(3'd0, 32'h2);
    rd(3'd1, d); check(d == 32'h0, "clear_done");
    wr(3'd0, 32'h1); pulse_done();
    rd(3'd1, d); check(d == 32'h2, "second job done");
    wr(3'd0, 32'h1);
    rd(3'd1, d); check(d == 32'h1, "start clears done");
    check(n_start == 3, "third start pulse");
    pulse_done();
    wr(3'd0, 32'hFFFF_FFFC);
    rd(3'd1, d); check(d == 32'h2, "reserved control bits ignored");
    // one-cycle read latency
    @(negedge clk);
    address = 3'd2; read = 1;
    @(posedge clk); #1;
    check(readdata == 32'h67, "readdata valid one cycle after read");
    @(negedge clk);
    read = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
