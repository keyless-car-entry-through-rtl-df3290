// tb_vga_timing: runs the raster generator for two frames at its default
// 640 x 480 timing and measures what it produces: 800 clocks per line, 96-clock
// HSYNC starting 16 clocks after the visible area, 525 lines per frame,
// 2-line VSYNC starting 10 lines after the picture, 640 x 480 visible pixels
// and one start-of-frame pulse per frame.
`timescale 1ns/1ps
module tb_vga_timing;

  logic clk = 0, rst_n = 0;
  always #20 clk = ~clk;
  initial begin #1 rst_n = 1; #1 rst_n = 0; end  // a falling edge applies the asynchronous reset

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  logic [9:0] h, v;
  logic       act, hs_n, vs_n, sof;
  vga_timing dut (.clk, .rst_n, .hcount(h), .vcount(v), .active(act), .hsync_n(hs_n),
                  .vsync_n(vs_n), .sof);

  initial begin
    int vis, hs_len, line_len, hs_start, lines, vs_lines, vs_start, sofs;
    int t_hs_fall, t_prev_fall, cyc, act_in_line, vs_q;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // align to a frame start
    do @(negedge clk); while (!sof);
    vis = 0; hs_len = 0; lines = 0; vs_lines = 0; sofs = 0; cyc = 0;
    t_prev_fall = -1; vs_start = -1; hs_start = -1; act_in_line = 0; vs_q = 1;
    for (int i = 0; i < 2 * 800 * 525; i++) begin
      if (sof) sofs++;
      if (!hs_n) hs_len++;
      if (h == 0) begin
        if (act_in_line != 0 && act_in_line != 640) check(0, $sformatf("visible clocks in line %0d", act_in_line));
        act_in_line = 0;
        lines++;
        if (!vs_n) vs_lines++;
        if (!vs_n && vs_q && vs_start < 0) vs_start = lines - 1;
        vs_q = vs_n;
      end
      if (act) begin vis++; act_in_line++; end
      if (!hs_n && h == 10'(640 + 16)) hs_start = 640 + 16;
      if (!hs_n && h == 10'(640 + 16) && i > 0) begin
        if (t_prev_fall >= 0) check(cyc - t_prev_fall == 800, "line period 800");
        t_prev_fall = cyc;
      end
      cyc++;
      @(negedge clk);
    end
    check(vis == 2 * 640 * 480, $sformatf("visible pixels %0d", vis));
    check(hs_len == 2 * 525 * 96, $sformatf("hsync clocks %0d", hs_len));
    check(hs_start == 656, "hsync starts after 16-clock front porch");
    check(lines == 2 * 525, $sformatf("lines %0d", lines));
    check(vs_lines == 2 * 2, $sformatf("vsync lines %0d", vs_lines));
    check(vs_start == 490, $sformatf("vsync starts at line %0d", vs_start));
    check(sofs == 2, $sformatf("start-of-frame pulses %0d", sofs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
