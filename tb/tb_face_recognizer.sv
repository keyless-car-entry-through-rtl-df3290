// tb_face_recognizer: the recognizer with a small SRAM (64 words, regions of
// 16) behind sram_ctrl and the behavioural SRAM. Frames of 24 pixels are
// driven directly. The testbench enrols 5 random face pixels through the
// host port, then plays:
//   a frame without a face            -> nothing happens
//   face frame, then the same 5 pixels -> match, lock opens; the captured
//                                        words in SRAM and the compare time
//                                        (4 clocks per pixel) are checked
//   relock; one pixel off by one step -> rejected with 1 mismatch
//   only 4 face pixels                -> rejected on count
//   20 face pixels                    -> overflow at 16
`timescale 1ns/1ps
module tb_face_recognizer;
  import face_pkg::*;

  localparam int unsigned AW = 6, REGION = 16, CAP = 16, NPIX = 24, NDB = 5;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  initial begin #1 rst_n = 1; #1 rst_n = 0; end  // a falling edge applies the asynchronous reset

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  logic          px_valid = 0, px_face = 0, frame_end = 0, face_seen = 0;
  rgb10_t        px_raw = '0;
  logic          host_we = 0, host_ready, relock = 0;
  logic [AW-1:0] host_addr = '0, db_count = '0;
  logic [15:0]   host_data = '0;
  logic          m_req, m_we, m_rvalid;
  logic [AW-1:0] m_addr, sram_addr;
  logic [15:0]   m_wdata, m_rdata, dq_o, dq_i;
  logic          lock_gpio, capturing, comparing, result_valid, match, overflow;
  logic [AW-1:0] cap_count, mismatches;
  logic          dq_oe, we_n, oe_n, ce_n, ub_n, lb_n;

  face_recognizer #(.AW(AW), .REGION(REGION), .DB_BASE(0), .CAP_BASE(CAP)) dut (
    .clk, .rst_n, .px_valid, .px_face, .px_raw, .frame_end, .face_seen,
    .host_we, .host_addr, .host_data, .db_count, .host_ready, .relock,
    .mem_req(m_req), .mem_we(m_we), .mem_addr(m_addr), .mem_wdata(m_wdata),
    .mem_rvalid(m_rvalid), .mem_rdata(m_rdata),
    .lock_gpio, .capturing, .comparing, .result_valid, .match, .overflow, .cap_count, .mismatches);

  sram_ctrl #(.AW(AW)) u_ctrl (.clk, .rst_n, .req(m_req), .we(m_we), .addr(m_addr),
    .wdata(m_wdata), .rvalid(m_rvalid), .rdata(m_rdata),
    .sram_addr, .sram_dq_o(dq_o), .sram_dq_oe(dq_oe), .sram_dq_i(dq_i),
    .sram_we_n(we_n), .sram_oe_n(oe_n), .sram_ce_n(ce_n), .sram_ub_n(ub_n), .sram_lb_n(lb_n));

  sram_model #(.AW(AW)) u_mem (.clk, .addr(sram_addr), .dq_o, .dq_oe, .dq_i, .we_n, .oe_n, .ce_n);

  rgb10_t face [NDB];

  function automatic logic [15:0] w565(rgb10_t p);
    return {p.r[9:5], p.g[9:4], p.b[9:5]};
  endfunction

  // play one frame; pixels listed in pix (face pixels), placed at random
  // positions in scan order among background pixels
  task automatic play(rgb10_t pix [$]);
    int left;
    left = pix.size();
    for (int i = 0; i < NPIX; i++) begin
      bit f;
      f = (left > 0) && ((NPIX - i <= left) || ($urandom_range(0, 1) == 1));
      @(negedge clk);
      px_valid = 1; px_face = f;
      px_raw = f ? pix[pix.size() - left] : '{r: 10'd20, g: 10'd20, b: 10'd20};
      if (f) left--;
      frame_end = (i == NPIX - 1); face_seen = (pix.size() > 0);
      @(negedge clk);
      px_valid = 0; frame_end = 0;
    end
  endtask

  task automatic wait_result(output bit m, output int cnt, output int mm, output bit ov,
                             output int cmp_clocks);
    cmp_clocks = 0;
    do begin
      @(posedge clk);
      if (comparing) cmp_clocks++;
    end while (!result_valid);
    m = match; cnt = int'(cap_count); mm = int'(mismatches); ov = overflow;
  endtask

  int n_cap_starts = 0;
  logic cap_q = 0;
  always @(posedge clk) begin
    cap_q <= capturing;
    if (capturing && !cap_q) n_cap_starts++;
  end

  initial begin
    rgb10_t q [$];
    bit m, ov;
    int cnt, mm, cc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NDB; i++)
      face[i] = '{r: 10'($urandom_range(301, 449)), g: 10'($urandom_range(301, 449)),
                  b: 10'($urandom_range(301, 449))};
    // enrol
    check(host_ready && !lock_gpio, "idle, locked, host port open");
    db_count = AW'(NDB);
    for (int i = 0; i < NDB; i++) begin
      @(negedge clk);
      host_we = 1; host_addr = AW'(i); host_data = w565(face[i]);
    end
    @(negedge clk);
    host_we = 0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < NDB; i++) check(u_mem.mem[i] == w565(face[i]), "enrolled word in SRAM");

    // no face: nothing starts
    q = {};
    play(q);
    repeat (4) @(negedge clk);
    check(n_cap_starts == 0 && !capturing, "no capture without a face");

    // face seen, then the enrolled face
    q = {face[0]};
    play(q);
    check(capturing, "capture starts after a frame with a face");
    check(!host_ready, "host port closed while capturing");
    q = {};
    foreach (face[i]) q.push_back(face[i]);
    play(q);
    wait_result(m, cnt, mm, ov, cc);
    check(m && cnt == NDB && mm == 0 && !ov, $sformatf("match: m=%0d cnt=%0d mm=%0d", m, cnt, mm));
    check(cc == 4 * NDB, $sformatf("compare took %0d clocks", cc));
    for (int i = 0; i < NDB; i++) check(u_mem.mem[CAP + i] == w565(face[i]), "captured word in SRAM");
    @(negedge clk);
    check(lock_gpio && host_ready, "unlocked");
    q = {face[1]};
    play(q);
    check(lock_gpio && !capturing, "stays unlocked, no capture until relock");
    relock = 1; @(negedge clk); relock = 0;
    check(!lock_gpio, "relocked");

    // one pixel differs by one 5-bit step
    q = {face[0]};
    play(q);
    q = {};
    foreach (face[i]) q.push_back(face[i]);
    q[2].r = q[2].r ^ 10'h020;
    play(q);
    wait_result(m, cnt, mm, ov, cc);
    check(!m && cnt == NDB && mm == 1, $sformatf("one-pixel difference: m=%0d mm=%0d", m, mm));
    @(negedge clk);
    check(!lock_gpio, "still locked");

    // too few face pixels
    q = {face[0]};
    play(q);
    q = {face[0], face[1], face[2], face[3]};
    play(q);
    wait_result(m, cnt, mm, ov, cc);
    check(!m && cnt == NDB - 1 && cc == 0, "count mismatch rejected without comparing");

    // too many: overflow
    q = {face[0]};
    play(q);
    q = {};
    for (int i = 0; i < 20; i++) q.push_back(face[i % NDB]);
    play(q);
    wait_result(m, cnt, mm, ov, cc);
    check(!m && ov && cnt == REGION, $sformatf("overflow: ov=%0d cnt=%0d", ov, cnt));
    check(u_mem.mem[CAP + REGION - 1] == w565(face[(REGION - 1) % NDB]), "last word of the region");
    check(u_mem.mem[0] == w565(face[0]), "database not overwritten");
    @(negedge clk);
    check(!lock_gpio, "locked at the end");
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
