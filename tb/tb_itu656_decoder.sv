// tb_itu656_decoder: feeds a small ITU-R 656 stream (16 samples per line,
// 6 picture lines per field) with a bright rectangle and checks every
// decoded word: luma against the picture, chroma bytes, column order, line
// numbers within the field, field bit and one word per two clocks.
`timescale 1ns/1ps
module tb_itu656_decoder;
  import face_pkg::*;

  localparam int unsigned COLS = 16, ROWS = 6, VBL = 3, HBL = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin #1 rst_n = 1; #1 rst_n = 0; end  // a falling edge applies the asynchronous reset

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  logic [7:0]  td_data;
  int unsigned frames;
  itu656_source #(.COLS(COLS), .ROWS(ROWS), .VBL(VBL), .HBL(HBL)) u_src (
    .clk, .rst_n, .face_y(8'd200), .x0(4), .x1(9), .l0(2), .l1(4),
    .td_data, .frame_count(frames));

  logic       v, sol, fld;
  yc422_t     w;
  logic [9:0] x;
  logic [8:0] line;
  itu656_decoder #(.COLS(COLS)) dut (.clk, .rst_n, .td_data, .out_valid(v), .out_word(w),
    .out_x(x), .out_line(line), .out_field(fld), .out_sol(sol));

  int words = 0, exp_x = 0, last_t = -1, cyc = 0;
  int lines_f [2] = '{0, 0};
  always @(posedge clk) begin
    cyc++;
    if (rst_n && v) begin
      logic [7:0] ey;
      ey = (x >= 4 && x < 9 && line >= 2 && line < 4) ? 8'd200 : 8'd16;
      check(w.y == ey, $sformatf("luma at x=%0d line=%0d: %0d vs %0d", x, line, w.y, ey));
      check(w.c == 8'h80, "chroma byte");
      check(x == 10'(exp_x), $sformatf("column %0d expected %0d", x, exp_x));
      check(sol == (x == 0), "start-of-line flag");
      check(line < 9'(ROWS), "line inside the field");
      if (x != 0) check(cyc - last_t == 2, "one word every two clocks");
      last_t = cyc;
      exp_x = (exp_x == COLS - 1) ? 0 : exp_x + 1;
      if (x == 10'(COLS - 1)) lines_f[fld]++;
      words++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (frames < 2) @(posedge clk);
    // the first frame may start mid-field; the second is whole
    check(lines_f[0] >= 2 * ROWS - 1 && lines_f[1] >= 2 * ROWS - 1,
          $sformatf("lines per field %0d %0d", lines_f[0], lines_f[1]));
    check(words >= (4 * ROWS - 2) * COLS, $sformatf("words decoded %0d", words));
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
