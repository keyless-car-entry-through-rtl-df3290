// tb_frame_buffer: writes a small 8 x 6 frame as two interleaved fields
// (line l of field f must land on row 2l+f), plus lines beyond the frame
// that must be ignored, then reads every position on a second clock and
// checks the word and the one-clock read latency.
`timescale 1ns/1ps
module tb_frame_buffer;
  import face_pkg::*;

  localparam int unsigned COLS = 8, ROWS = 6;

  logic wclk = 0, rclk = 0;
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  logic       wr_valid = 0, wr_field = 0, rd_en = 0, rd_valid;
  logic [9:0] wr_x = '0, rd_x = '0, rd_y = '0;
  logic [8:0] wr_line = '0;
  yc422_t     wr_word = '0, rd_word;

  frame_buffer #(.COLS(COLS), .ROWS(ROWS)) dut (.wclk, .wr_valid, .wr_x, .wr_line, .wr_field,
    .wr_word, .rclk, .rd_en, .rd_x, .rd_y, .rd_valid, .rd_word);

  function automatic yc422_t pat(int row, int col);
    return '{y: 8'(row * 16 + col), c: 8'(255 - row * 16 - col)};
  endfunction

  initial begin
    // field 0 then field 1, each with one extra line past the frame
    for (int f = 0; f < 2; f++)
      for (int l = 0; l <= ROWS / 2; l++)
        for (int c = 0; c < COLS; c++) begin
          @(negedge wclk);
          wr_valid = 1; wr_field = f[0]; wr_line = 9'(l); wr_x = 10'(c);
          wr_word  = (l < ROWS / 2) ? pat(2 * l + f, c) : '{y: 8'hEE, c: 8'hEE};
        end
    @(negedge wclk);
    wr_valid = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        @(negedge rclk);
        rd_en = 1; rd_x = 10'(c); rd_y = 10'(r);
        @(negedge rclk);
        rd_en = 0;
        check(rd_valid, "read valid one clock after rd_en");
        check(rd_word == pat(r, c), $sformatf("row %0d col %0d: %h", r, c, rd_word));
      end
    // the out-of-frame line must not have overwritten row 0
    @(negedge rclk); rd_en = 1; rd_x = 0; rd_y = 0;
    @(negedge rclk); rd_en = 0;
    check(rd_word == pat(0, 0), "line beyond the frame ignored");
    @(negedge rclk);
    check(!rd_valid, "no valid without rd_en");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
