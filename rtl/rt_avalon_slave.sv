// rt_avalon_slave: Avalon-MM control/status registers of the accelerator.
//
// Six 32-bit registers at word addresses 0..5 (byte offsets 0x00..0x14):
//   0 CONTROL  W   bit 0 start (one-cycle pulse), bit 1 clear_done
//   1 STATUS   R   bit 0 busy, bit 1 done (sticky); other bits read 0
//   2 ROW_Y    RW  row index, low 9 bits kept
//   3 LIGHT_X  RW  signed Q13.10 light x in bits [23:0]
//   4 LIGHT_Y  RW  light y
//   5 LIGHT_Z  RW  light z
// Writing start sets busy, clears done and pulses `start` toward the row
// scheduler (ignored while busy). The scheduler's `row_done` pulse clears
// busy and sets done, which stays set until clear_done or the next start.
// Reads have a fixed latency of one cycle (readdata registered). Light
// registers read back their 24 bits with bits [31:24] zero; unused
// addresses read zero. The register map follows the document; the read
// latency, the zero upper bits and ignoring start while busy are this
// design's choices.
module rt_avalon_slave
  import rt_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic [2:0]    address,
  input  logic          write,
  input  logic [31:0]   writedata,
  input  logic          read,
  output logic [31:0]   readdata,
  // to / from the row scheduler
  output logic          start,
  output logic [YW-1:0] row_y,
  output vec3_t         light,
  input  logic          row_done
);
  typedef enum logic [2:0] {
    REG_CONTROL = 3'd0,
    REG_STATUS  = 3'd1,
    REG_ROW_Y   = 3'd2,
    REG_LIGHT_X = 3'd3,
    REG_LIGHT_Y = 3'd4,
    REG_LIGHT_Z = 3'd5
  } reg_addr_t;

  logic busy, done_flag;
  logic wr_start, wr_clear;

  always_comb begin
    wr_start = write && (address == REG_CONTROL) && writedata[0];
    wr_clear = write && (address == REG_CONTROL) && writedata[1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      start     <= 1'b0;
      busy      <= 1'b0;
      done_flag <= 1'b0;
      row_y     <= '0;
      light     <= '0;
      readdata  <= '0;
    end else begin
      start <= 1'b0;
      if (write) begin
        unique case (address)
          REG_ROW_Y:   row_y   <= writedata[YW-1:0];
          REG_LIGHT_X: light.x <= fix_t'(writedata[FW-1:0]);
          REG_LIGHT_Y: light.y <= fix_t'(writedata[FW-1:0]);
          REG_LIGHT_Z: light.z <= fix_t'(writedata[FW-1:0]);
          default: ;
        endcase
      end
      if (wr_clear) done_flag <= 1'b0;
      if (wr_start && !busy) begin
        start     <= 1'b1;
        busy      <= 1'b1;
        done_flag <= 1'b0;
      end else if (row_done) begin
        busy      <= 1'b0;
        done_flag <= 1'b1;
      end
      if (read) begin
        unique case (address)
          REG_STATUS:  readdata <= {30'd0, done_flag, busy};
          REG_ROW_Y:   readdata <= {{(32-YW){1'b0}}, row_y};
          REG_LIGHT_X: readdata <= {8'd0, light.x};
          REG_LIGHT_Y: readdata <= {8'd0, light.y};
          REG_LIGHT_Z: readdata <= {8'd0, light.z};
          default:     readdata <= '0;
        endcase
      end
    end
  end

  a_no_rw: assert property (@(posedge clk) disable iff (rst) !(read && write));
endmodule
