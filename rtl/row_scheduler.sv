// row_scheduler: sweeps one image row in batches of LANES pixels.
//
// On `start` it latches the row index and light position and then issues
// the batches (x, y) ... (x+LANES-1, y) for x = 0, LANES, ..., WIDTH-LANES,
// one batch whenever every lane is ready: lane_vld goes high for all lanes
// in the same cycle and each lane i takes pixel batch_x + i. It counts the
// pixels the lanes write back (lane_wr) and, once all WIDTH pixels of the
// row have been written, pulses `done` for one cycle and drops `busy`.
// A `start` while busy is ignored. The batching and the done condition follow
// the document; issuing a batch only when all lanes are ready (so lanes stay
// in step) and ignoring a start while busy are this design's choices.
module row_scheduler
  import rt_pkg::*;
#(
  parameter int LANES = 6,
  parameter int WIDTH = IMG_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [YW-1:0]    row_y,
  input  vec3_t            light,
  output logic             busy,
  output logic             done,
  // to the lanes
  output logic             lane_vld,
  input  logic [LANES-1:0] lane_rdy,
  output logic [XW-1:0]    batch_x,
  output logic [YW-1:0]    pixel_y,
  output vec3_t            lane_light,
  // pixel written back by lane i
  input  logic [LANES-1:0] lane_wr
);
  logic          issuing;
  logic [XW:0]   written;
  logic [XW:0]   nwr;

  always_comb begin
    nwr = '0;
    for (int i = 0; i < LANES; i++) nwr += (XW+1)'(lane_wr[i]);
  end

  assign lane_vld = issuing && (&lane_rdy);

  always_ff @(posedge clk) begin
    if (rst) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      issuing    <= 1'b0;
      batch_x    <= '0;
      pixel_y    <= '0;
      lane_light <= '0;
      written    <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy       <= 1'b1;
        issuing    <= 1'b1;
        batch_x    <= '0;
        pixel_y    <= row_y;
        lane_light <= light;
        written    <= '0;
      end else if (busy) begin
        if (lane_vld) begin
          if (int'(batch_x) + LANES >= WIDTH) issuing <= 1'b0;
          else                                batch_x <= batch_x + XW'(LANES);
        end
        written <= written + nwr;
        if (!issuing && (written + nwr) == (XW+1)'(WIDTH)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  a_width: assert property (@(posedge clk) disable iff (rst) written <= (XW+1)'(WIDTH));
endmodule
