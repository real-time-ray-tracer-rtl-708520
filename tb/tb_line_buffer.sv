// tb_line_buffer: fills the 480-entry buffer the way the six lanes do
// (six columns per cycle, lane i writing columns with x mod 6 = i, in a
// random batch order, some batches written twice so the last value must
// win), then reads every column back through the single read port and
// checks the value and the one-cycle read latency. Columns 480 and above
// must read as zero.
module tb_line_buffer;
  import rt_pkg::*;
  localparam int LANES = 6;
  localparam int WIDTH = 480;
  logic clk = 0;
  logic [LANES-1:0] wr_en = '0;
  logic [LANES-1:0][XW-1:0] wr_addr = '0;
  logic [LANES-1:0][23:0] wr_data = '0;
  logic rd_en = 0;
  logic [XW-1:0] rd_addr = '0;
  logic [23:0] rd_data;
  logic [23:0] model[WIDTH];
  int checks = 0, failures = 0;
  int order[WIDTH / LANES];

  line_buffer #(.LANES(LANES), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (order[i]) order[i] = i;
    order.shuffle();
    for (int pass = 0; pass < 2; pass++) begin
      foreach (order[k]) begin
        if (pass == 1 && k % 3 != 0) continue;
        @(negedge clk);
        for (int i = 0; i < LANES; i++) begin
          int x;
          x = order[k] * LANES + i;
          wr_en[i]   = ($urandom_range(0, 7) != 0) || pass == 0;
          wr_addr[i] = XW'(x);
          wr_data[i] = 24'($urandom);
          if (wr_en[i]) model[x] = wr_data[i];
        end
      end
    end
    @(negedge clk);
    wr_en = '0;
    for (int x = 0; x < 512; x++) begin
      @(negedge clk);
      rd_en = 1; rd_addr = XW'(x);
      @(negedge clk);
      rd_en = 0;
      rd_addr = XW'($urandom);             // must not disturb the registered result
      checks++;
      if (rd_data !== ((x < WIDTH) ? model[x] : 24'd0)) begin
        failures++;
        $display("FAIL column %0d read %06h expected %06h", x, rd_data, (x < WIDTH) ? model[x] : 24'd0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
