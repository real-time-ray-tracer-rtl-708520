// line_buffer: on-chip RAM for one finished image row, WIDTH x 24 bits.
//
// The six lanes write six pixels at a time, so the buffer is split into
// LANES banks of WIDTH/LANES words: column x lives in bank x mod LANES at
// word x / LANES. Lane i only ever writes columns with x mod LANES = i, so
// each bank has a single write port, and all lanes can write in the same
// cycle. The bus side reads one column at a time: rd_addr selects the column,
// and rd_data (the 0xRRGGBB pixel) is valid the cycle after rd_en. Columns
// WIDTH and above read as zero. Contents are only meaningful after the row's
// done; they are not cleared between rows.
// Size and use follow the document; the banked layout is this design's way
// of giving six lanes a write port each.
module line_buffer
  import rt_pkg::*;
#(
  parameter int LANES = 6,
  parameter int WIDTH = IMG_W
) (
  input  logic                  clk,
  input  logic [LANES-1:0]      wr_en,
  input  logic [LANES-1:0][XW-1:0] wr_addr,
  input  logic [LANES-1:0][23:0]   wr_data,
  input  logic                  rd_en,
  input  logic [XW-1:0]         rd_addr,
  output logic [23:0]           rd_data
);
  localparam int DEPTH = WIDTH / LANES;

  logic [23:0] mem [LANES][DEPTH];
  logic [23:0] rd_word [LANES];
  logic [$clog2(LANES)-1:0] rd_bank;
  logic        rd_valid;

  always_ff @(posedge clk) begin
    for (int i = 0; i < LANES; i++) begin
      if (wr_en[i]) mem[i][int'(wr_addr[i]) / LANES] <= wr_data[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      for (int i = 0; i < LANES; i++) rd_word[i] <= mem[i][(int'(rd_addr) / LANES) % DEPTH];
      rd_bank  <= $clog2(LANES)'(int'(rd_addr) % LANES);
      rd_valid <= int'(rd_addr) < WIDTH;
    end
  end

  assign rd_data = rd_valid ? rd_word[rd_bank] : 24'd0;

  for (genvar i = 0; i < LANES; i++) begin : g_chk
    a_bank: assert property (@(posedge clk) wr_en[i] |-> (int'(wr_addr[i]) % LANES == i) && (int'(wr_addr[i]) < WIDTH));
  end
endmodule
