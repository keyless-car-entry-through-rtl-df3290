// tb_face_lock_top: end-to-end test of the face-recognition lock at its
// default sizes (640 x 480 picture, 256K-word SRAM, 128K-word regions).
//
// A behavioural ITU-R 656 source plays a black scene with a gray
// rectangular "face"; a behavioural SRAM holds the enrolled face, which the
// testbench loads through the host port with the pixel count and the 5-6-5
// value it works out itself from the BT.601 equations and the 8-of-9 pair
// downsampling. The scenario:
//   1. a different face (brighter gray)          -> rejected on pixel values
//   2. the enrolled face                          -> lock opens, VGA frame
//      checked: exactly the face pixels are white and in the right place
//   3. relock, a larger face                      -> rejected on pixel count
//   4. a face filling the frame                   -> capture overflows
//   5. black scene                                -> no face, lock stays shut
// Every mechanism (host load, face start, capture, compare, pixel reject,
// count reject, overflow, unlock, relock, masking, I2C set-up) is counted
// and must have happened at least once.
`timescale 1ns/1ps
module tb_face_lock_top;

  localparam int unsigned AW = 18;

  logic td_clk = 0, vga_clk = 0, rst_n = 0;
  always #18.5 td_clk  = ~td_clk;
  initial begin #1 rst_n = 1; #1 rst_n = 0; end  // a falling edge applies the asynchronous reset    // 27 MHz
  always #20   vga_clk = ~vga_clk;   // 25 MHz

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- video source ----------------
  logic [7:0]  face_y;
  int unsigned x0, x1, l0, l1, frames;
  logic [7:0]  td_data;
  itu656_source u_src (.clk(td_clk), .rst_n, .face_y, .x0, .x1, .l0, .l1,
                       .td_data, .frame_count(frames));

  // ---------------- DUT ----------------
  logic          i2c_scl, i2c_sda_oe, i2c_done, i2c_nack;
  logic [9:0]    vga_r, vga_g, vga_b;
  logic          vga_hs_n, vga_vs_n, vga_blank_n;
  logic [AW-1:0] sram_addr;
  logic [15:0]   sram_dq_o, sram_dq_i;
  logic          sram_dq_oe, sram_we_n, sram_oe_n, sram_ce_n, sram_ub_n, sram_lb_n;
  logic          host_we = 0, host_ready, relock = 0, mask_en = 1;
  logic [AW-1:0] host_addr = '0, db_count = '0;
  logic [15:0]   host_data = '0;
  logic          lock_gpio, face_present, scene_disturbed, face_start, capturing, comparing;
  logic          result_valid, match, overflow;
  logic [9:0]    face_start_x, face_start_y;
  logic [AW-1:0] cap_count, mismatches;

  face_lock_top dut (
    .td_clk, .vga_clk, .rst_n, .td_data,
    .i2c_scl, .i2c_sda_oe, .i2c_sda_i(1'b0), .i2c_done, .i2c_nack,
    .mask_en, .vga_r, .vga_g, .vga_b, .vga_hs_n, .vga_vs_n, .vga_blank_n,
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i,
    .sram_we_n, .sram_oe_n, .sram_ce_n, .sram_ub_n, .sram_lb_n,
    .host_we, .host_addr, .host_data, .db_count, .host_ready, .relock,
    .lock_gpio, .face_present, .scene_disturbed, .face_start, .face_start_x, .face_start_y,
    .capturing, .comparing, .result_valid, .match, .overflow,
    .cap_count, .mismatches
  );

  sram_model #(.AW(AW)) u_mem (
    .clk(vga_clk), .addr(sram_addr), .dq_o(sram_dq_o), .dq_oe(sram_dq_oe),
    .dq_i(sram_dq_i), .we_n(sram_we_n), .oe_n(sram_oe_n), .ce_n(sram_ce_n)
  );

  // ---------------- reference model ----------------
  // output column of input column c, or -1 when its pair is dropped
  function automatic int out_col(int c);
    int p;
    p = c / 2;
    if (p % 9 == 8) return -1;
    return 2 * (p - p / 9) + (c % 2);
  endfunction

  // 10-bit channel of a gray pixel (Cb = Cr = 128) by BT.601, rounded
  function automatic int gray10(int y);
    real v;
    v = 1.164 * (y - 16) * 4.0;
    if (v < 0.0) v = 0.0;
    if (v > 1023.0) v = 1023.0;
    return int'(v);
  endfunction

  function automatic logic [15:0] word565(int v);
    logic [9:0] c;
    c = 10'(v);
    return {c[9:5], c[9:4], c[9:5]};
  endfunction

  int n_cols, first_col, expect_count;
  bit face_col [640];
  task automatic expected_face(int ax0, int ax1, int al0, int al1);
    n_cols = 0; first_col = -1;
    foreach (face_col[i]) face_col[i] = 0;
    for (int c = ax0; c < ax1; c++) begin
      if (out_col(c) >= 0) begin
        face_col[out_col(c)] = 1;
        n_cols++;
        if (first_col < 0) first_col = out_col(c);
      end
    end
    expect_count = n_cols * (al1 - al0) * 2;
  endtask

  // ---------------- mechanism counters ----------------
  int n_load = 0, n_start = 0, n_capture = 0, n_compare = 0, n_reject_px = 0;
  int n_reject_cnt = 0, n_overflow = 0, n_unlock = 0, n_relock = 0, n_mask = 0;
  logic cap_q = 0, cmp_q = 0, lock_q = 0;
  always @(posedge vga_clk) begin
    cap_q  <= capturing;
    cmp_q  <= comparing;
    lock_q <= lock_gpio;
    if (face_start) n_start++;
    if (capturing && !cap_q) n_capture++;
    if (comparing && !cmp_q) n_compare++;
    if (lock_gpio && !lock_q) n_unlock++;
    if (!lock_gpio && lock_q) n_relock++;
    if (result_valid && !match && overflow) n_overflow++;
    if (result_valid && !match && !overflow && cap_count != db_count) n_reject_cnt++;
    if (result_valid && !match && cap_count == db_count && mismatches != 0) n_reject_px++;
  end

  // VGA output raster position
  int vcol = 0, vrow = 0, white_ok = 0, white_bad = 0, miss = 0;
  logic blank_q = 0;
  bit   audit = 0;
  int   fl0, fl1;
  always @(posedge vga_clk) begin
    blank_q <= vga_blank_n;
    if (!vga_vs_n) begin
      vrow <= 0; vcol <= 0;
    end else if (vga_blank_n) begin
      vcol <= vcol + 1;
      if (audit) begin
        bit in_face, white;
        in_face = face_col[vcol] && vrow >= 2 * fl0 && vrow < 2 * fl1;
        white   = (vga_r == 10'h3FF) && (vga_g == 10'h3FF) && (vga_b == 10'h3FF);
        if (white && in_face) white_ok++;
        else if (white) white_bad++;
        else if (in_face) miss++;
      end
    end else if (blank_q) begin
      vcol <= 0; vrow <= vrow + 1;
    end
  end

  task automatic wait_result(output bit m, output bit ov, output logic [AW-1:0] cnt,
                             output logic [AW-1:0] mm);
    do @(posedge vga_clk); while (!result_valid);
    m = match; ov = overflow; cnt = cap_count; mm = mismatches;
  endtask

  task automatic wait_frames(int n);
    int f0;
    f0 = frames;
    while (frames < f0 + n) @(posedge td_clk);
  endtask

  // ---------------- scenario ----------------
  initial begin
    bit m, ov;
    logic [AW-1:0] cnt, mm;
    logic [15:0] enrolled;
    int tries;

    face_y = 8'd16; x0 = 300; x1 = 380; l0 = 80; l1 = 120;
    repeat (5) @(posedge vga_clk);
    rst_n = 1;

    // enrol face A: gray Y = 96
    expected_face(300, 380, 80, 120);
    enrolled = word565(gray10(96));
    @(posedge vga_clk);
    check(host_ready, "host port ready after reset");
    db_count <= AW'(expect_count);
    for (int i = 0; i < expect_count; i++) begin
      host_we <= 1; host_addr <= AW'(i); host_data <= enrolled;
      @(posedge vga_clk);
      n_load++;
    end
    host_we <= 0;
    repeat (3) @(posedge vga_clk);
    check(u_mem.mem[0] == enrolled && u_mem.mem[expect_count-1] == enrolled,
          "enrolled face written to SRAM");
    $display("enrolled %0d pixels of 0x%04h", expect_count, enrolled);

    // 1. a different face: Y = 100
    face_y = 8'd100;
    wait_result(m, ov, cnt, mm);
    tries = 0;
    while (cnt != AW'(expect_count) && tries < 4) begin   // first capture may be torn
      wait_result(m, ov, cnt, mm); tries++;
    end
    check(!m, "different face rejected");
    check(cnt == AW'(expect_count), $sformatf("different face: count %0d", cnt));
    check(mm == AW'(expect_count), $sformatf("different face: every pixel differs (%0d)", mm));
    check(!lock_gpio, "lock stays shut for a different face");

    // 2. the enrolled face: Y = 96
    face_y = 8'd96;
    tries = 0;
    do begin wait_result(m, ov, cnt, mm); tries++; end while (!m && tries < 6);
    check(m, "enrolled face matched");
    check(cnt == AW'(expect_count), $sformatf("match count %0d vs %0d", cnt, expect_count));
    @(posedge vga_clk);
    check(lock_gpio, "lock_gpio high after a match");
    check(face_start_x == 10'(first_col) && face_start_y == 10'(2 * l0),
          $sformatf("first face pixel at (%0d,%0d), expected (%0d,%0d)",
                    face_start_x, face_start_y, first_col, 2 * l0));
    // audit one whole VGA frame: masked pixels exactly on the face
    fl0 = int'(l0); fl1 = int'(l1);
    @(negedge vga_vs_n); @(posedge vga_vs_n);
    audit = 1;
    @(negedge vga_vs_n);
    audit = 0;
    n_mask = white_ok;
    check(white_ok == expect_count, $sformatf("white pixels on face %0d of %0d", white_ok, expect_count));
    check(white_bad == 0, $sformatf("white pixels off the face %0d", white_bad));
    check(miss == 0, $sformatf("face pixels not masked %0d", miss));
    check(face_present && scene_disturbed, "face_present and scene_disturbed during the face");

    // 3. larger face, then relock: rejected on count
    x1 = 420;
    wait_frames(2);
    check(lock_gpio, "lock stays open until relock");
    relock <= 1; @(posedge vga_clk); relock <= 0;
    @(posedge vga_clk);
    check(!lock_gpio, "relock closes the lock");
    wait_result(m, ov, cnt, mm);
    check(!m && !ov && cnt > AW'(expect_count), $sformatf("larger face rejected on count %0d", cnt));

    // 4. face over the whole picture: capture region overflows
    x0 = 0; x1 = 720; l0 = 0; l1 = 240;
    wait_frames(1);
    tries = 0;
    do begin wait_result(m, ov, cnt, mm); tries++; end while (!ov && tries < 4);
    check(ov && !m, "full-frame face overflows the capture region");
    check(cnt == AW'(131072), $sformatf("capture stopped at the region size (%0d)", cnt));

    // 5. black scene: nothing starts
    face_y = 8'd16;
    wait_frames(2);
    check(!face_present && !scene_disturbed, "no face and an undisturbed background on a black scene");
    begin
      int caps;
      caps = n_capture;
      wait_frames(1);
      check(n_capture == caps, "no capture on a black scene");
    end
    check(!lock_gpio, "lock shut at the end");
    check(i2c_done && !i2c_nack, "decoder set-up over I2C finished");

    $display("mechanisms: load=%0d face_start=%0d capture=%0d compare=%0d reject_pixels=%0d reject_count=%0d overflow=%0d unlock=%0d relock=%0d masked=%0d",
             n_load, n_start, n_capture, n_compare, n_reject_px, n_reject_cnt, n_overflow,
             n_unlock, n_relock, n_mask);
    check(n_load > 0, "host load happened");
    check(n_start > 0, "face start happened");
    check(n_capture > 0, "capture happened");
    check(n_compare > 0, "compare happened");
    check(n_reject_px > 0, "pixel reject happened");
    check(n_reject_cnt > 0, "count reject happened");
    check(n_overflow > 0, "overflow happened");
    check(n_unlock > 0, "unlock happened");
    check(n_relock > 0, "relock happened");
    check(n_mask > 0, "masking happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: about 21 input frames, twice the scenario length
  initial begin
    #700ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
