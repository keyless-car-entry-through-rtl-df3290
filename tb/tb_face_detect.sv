// tb_face_detect: plays 6 frames of 8 x 4 pixels drawn from background,
// face, "distorted but not face" and boundary values (200, 300, 450) and
// checks, one clock after each pixel: the face and background flags, the
// white mask with mask_en on and off, the per-frame background-disturbed
// report (frame 5 is all background), the first-face pulse and its place,
// and the end-of-frame face_seen report.
`timescale 1ns/1ps
module tb_face_detect;
  import face_pkg::*;

  localparam int unsigned COLS = 8, ROWS = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin #1 rst_n = 1; #1 rst_n = 0; end  // a falling edge applies the asynchronous reset

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  logic       mask_en = 0, in_valid = 0;
  rgb10_t     in_rgb = '0;
  logic [9:0] in_x = '0, in_y = '0;
  logic       ov, oface, obg, ofirst, oend, oseen, odist;
  rgb10_t     orgb, oraw;
  logic [9:0] ox, oy;

  face_detect #(.COLS(COLS), .ROWS(ROWS)) dut (.clk, .rst_n, .mask_en, .in_valid, .in_rgb,
    .in_x, .in_y, .out_valid(ov), .out_rgb(orgb), .out_raw(oraw), .out_x(ox), .out_y(oy),
    .out_face(oface), .out_bg(obg), .first_face(ofirst), .frame_end(oend), .face_seen(oseen), .disturbed(odist));

  function automatic logic [9:0] pick(int kind);
    case (kind)
      0: return 10'($urandom_range(0, 199));      // background
      1: return 10'($urandom_range(301, 449));    // face
      2: return 10'($urandom_range(200, 300));    // distorted, below face
      default: return 10'($urandom_range(450, 1023));
    endcase
  endfunction

  initial begin
    int n_first, n_seen_frames;
    n_seen_frames = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      bit seen, dist_seen;
      seen = 0; dist_seen = 0; n_first = 0;
      mask_en = f[0];
      for (int y = 0; y < ROWS; y++)
        for (int x = 0; x < COLS; x++) begin
          int kr, kg, kb;
          bit ef, eb;
          rgb10_t p;
          // frame 2 has no face at all; elsewhere faces are common
          if (f == 5) begin kr = 0; kg = 0; kb = 0; end else begin
          kr = (f == 2) ? ($urandom_range(0, 1) * 2) : $urandom_range(0, 3);
          kg = (kr == 1 && $urandom_range(0, 3) != 0) ? 1 : ((f == 2) ? 0 : $urandom_range(0, 3));
          kb = (kr == 1 && kg == 1 && $urandom_range(0, 3) != 0) ? 1 : ((f == 2) ? 0 : $urandom_range(0, 3));
          end
          p = '{r: pick(kr), g: pick(kg), b: pick(kb)};
          if (x == 1 && y == 0 && f == 3) p = '{r: 10'd300, g: 10'd400, b: 10'd400};  // edge: not face
          if (x == 2 && y == 0 && f == 3) p = '{r: 10'd400, g: 10'd450, b: 10'd400};  // edge: not face
          if (x == 3 && y == 0 && f == 3) p = '{r: 10'd199, g: 10'd199, b: 10'd199};  // edge: background
          if (x == 4 && y == 0 && f == 3) p = '{r: 10'd200, g: 10'd0,   b: 10'd0};    // edge: not background
          ef = (p.r > 300 && p.r < 450) && (p.g > 300 && p.g < 450) && (p.b > 300 && p.b < 450);
          eb = (p.r < 200) && (p.g < 200) && (p.b < 200);
          @(negedge clk);
          in_valid = 1; in_rgb = p; in_x = 10'(x); in_y = 10'(y);
          @(negedge clk);
          in_valid = 0;
          check(ov && ox == 10'(x) && oy == 10'(y), "position passed through");
          check(oface == ef, $sformatf("face flag f%0d (%0d,%0d) %h", f, x, y, p));
          check(obg == eb, $sformatf("background flag f%0d (%0d,%0d) %h", f, x, y, p));
          check(oraw == p, "raw pixel");
          begin
            rgb10_t em;
            em = p;
            if (ef && mask_en) em = '{r: 10'h3FF, g: 10'h3FF, b: 10'h3FF};
            check(orgb == em, "masked output");
          end
          check(ofirst == (ef && !seen), "first face pulse");
          if (ofirst) n_first++;
          seen |= ef;
          dist_seen |= !eb;
          check(oend == (x == COLS - 1 && y == ROWS - 1), "frame end pulse");
          if (oend) begin
            check(oseen == seen, $sformatf("face_seen for frame %0d", f));
            check(odist == dist_seen, $sformatf("disturbed for frame %0d", f));
            if (seen) n_seen_frames++;
          end
        end
      check(n_first == (seen ? 1 : 0), "one first-face pulse per frame with a face");
    end
    check(n_seen_frames >= 1 && n_seen_frames <= 4, "frames with and without faces");
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
