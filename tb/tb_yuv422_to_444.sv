// tb_yuv422_to_444: streams random 4:2:2 lines on consecutive clocks and
// checks that every pixel leaves exactly two clocks later with its own luma
// and the Cb of its pair's even word and the Cr of its odd word.
`timescale 1ns/1ps
module tb_yuv422_to_444;
  import face_pkg::*;

  localparam int unsigned W = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin #1 rst_n = 1; #1 rst_n = 0; end  // a falling edge applies the asynchronous reset

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  logic       in_valid = 0, ov;
  yc422_t     in_word = '0;
  logic [9:0] in_x = '0, ox;
  ycbcr_t     op;

  yuv422_to_444 dut (.clk, .rst_n, .in_valid, .in_word, .in_x,
    .out_valid(ov), .out_pix(op), .out_x(ox));

  yc422_t line [W];
  int cyc = 0, n_out = 0;
  int t_in [W];
  always @(posedge clk) begin
    cyc++;
    if (ov) begin
      int k;
      ycbcr_t e;
      k = int'(ox);
      e = '{y: line[k].y, cb: line[k & ~1].c, cr: line[k | 1].c};
      check(op == e, $sformatf("pixel %0d: %h expected %h", k, op, e));
      check(cyc - t_in[k] == 2, $sformatf("pixel %0d latency %0d", k, cyc - t_in[k]));
      n_out++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < 4; l++) begin
      for (int i = 0; i < W; i++) line[i] = '{y: 8'($urandom), c: 8'($urandom)};
      for (int i = 0; i < W; i++) begin
        @(negedge clk);
        in_valid = 1; in_x = 10'(i); in_word = line[i]; t_in[i] = cyc + 1;
      end
      @(negedge clk);
      in_valid = 0;
      repeat (6) @(negedge clk);
      check(n_out == W * (l + 1), $sformatf("pixels out %0d", n_out));
    end
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
