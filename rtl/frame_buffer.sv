// frame_buffer: one frame of 4:2:2 words between the video input and the
// display side.
//
// The document buffers the decoded video in SDRAM as a frame FIFO; here the
// same role is played by a dual-port memory array with separate write and
// read clocks (an inferred RAM; on the original board this is the SDRAM and
// its controller). The two NTSC fields are woven into one progressive
// frame: line l of field f is stored as frame row 2*l + f, so the display
// side reads rows 0..479 in order. Words are stored at row * COLS + column.
// Writes with row >= ROWS (lines beyond the 480-line picture) are ignored.
//
// Interface: write port on wclk (valid, column, line in field, field, word);
// read port on rclk (rd_en, column, row), data valid one clock after rd_en
// (rd_valid). Reading and writing may overlap; a frame being read may be
// partly overwritten by the next one, as with the original FIFO.
module frame_buffer
  import face_pkg::*;
#(
  parameter int unsigned COLS = H_ACTIVE,
  parameter int unsigned ROWS = V_ACTIVE
) (
  input  logic       wclk,
  input  logic       wr_valid,
  input  logic [9:0] wr_x,
  input  logic [8:0] wr_line,
  input  logic       wr_field,
  input  yc422_t     wr_word,
  input  logic       rclk,
  input  logic       rd_en,
  input  logic [9:0] rd_x,
  input  logic [9:0] rd_y,
  output logic       rd_valid,
  output yc422_t     rd_word
);

  localparam int unsigned DEPTH = COLS * ROWS;
  localparam int unsigned AW    = $clog2(DEPTH);

  yc422_t mem [DEPTH];

  wire [9:0] wr_row = {wr_line, wr_field};
  wire [AW-1:0] waddr = AW'(wr_row * COLS + wr_x);
  wire [AW-1:0] raddr = AW'(rd_y * COLS + rd_x);

  always_ff @(posedge wclk) begin
    if (wr_valid && (wr_row < 10'(ROWS)) && (wr_x < 10'(COLS)))
      mem[waddr] <= wr_word;
  end

  always_ff @(posedge rclk) begin
    rd_valid <= rd_en;
    if (rd_en) rd_word <= mem[raddr];
  end

endmodule
