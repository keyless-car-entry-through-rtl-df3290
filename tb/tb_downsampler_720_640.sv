// tb_downsampler_720_640: sends three 720-sample lines (luma = column mod
// 256, chroma = column / 256 + line) and checks that 640 samples come out
// per line, numbered 0..639, each carrying the input sample the 8-of-9
// pair rule keeps, one clock after it went in.
`timescale 1ns/1ps
module tb_downsampler_720_640;
  import face_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin #1 rst_n = 1; #1 rst_n = 0; end  // a falling edge applies the asynchronous reset

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  logic       in_valid = 0, in_sol = 0, in_field = 0;
  yc422_t     in_word = '0;
  logic [8:0] in_line = '0;
  logic       ov, ofld;
  yc422_t     ow;
  logic [9:0] ox;
  logic [8:0] oline;

  downsampler_720_640 dut (.clk, .rst_n, .in_valid, .in_word, .in_sol, .in_line, .in_field,
    .out_valid(ov), .out_word(ow), .out_x(ox), .out_line(oline), .out_field(ofld));

  // kept input columns in order, worked out from the pair rule
  int kept [$];
  int n_out = 0, cur_line = 0;
  always @(posedge clk) begin
    if (ov) begin
      int c;
      c = kept[ox];
      check(ow.y == 8'(c % 256) && ow.c == 8'(c / 256 + cur_line),
            $sformatf("line %0d column %0d carries input %0d", oline, ox, c));
      check(oline == 9'(cur_line), "line number passed through");
      check(ox == 10'(n_out % 640), "output column order");
      n_out++;
    end
  end

  initial begin
    for (int c = 0; c < 720; c++) if ((c / 2) % 9 != 8) kept.push_back(c);
    check(kept.size() == 640, "reference keeps 640");
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < 3; l++) begin
      cur_line = l;
      for (int c = 0; c < 720; c++) begin
        @(negedge clk);
        in_valid = 1; in_sol = (c == 0); in_line = 9'(l);
        in_word = '{y: 8'(c % 256), c: 8'(c / 256 + l)};
        // idle clock between samples, as from the decoder
        @(negedge clk);
        in_valid = 0;
      end
      repeat (5) @(negedge clk);
      check(n_out == 640 * (l + 1), $sformatf("640 samples per line (%0d)", n_out));
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
