// tb_face_recognizer_tol: the recognizer with its tolerances opened up
// (TOL = 1 step per 5/6-bit channel, MAX_MISMATCH = 1 pixel), small SRAM
// (64 words, regions of 16), 5 enrolled random face pixels. Plays:
//   every pixel off by one step            -> match (within TOL)
//   relock; one pixel off by two steps     -> match (one mismatch allowed)
//   relock; two pixels off by two steps    -> rejected with 2 mismatches
`timescale 1ns/1ps
module tb_face_recognizer_tol;
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

  face_recognizer #(.AW(AW), .REGION(REGION), .DB_BASE(0), .CAP_BASE(CAP), .TOL(1),
                  .MAX_MISMATCH(1)) dut (
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
      face[i] = '{r: 10'($urandom_range(320, 420)), g: 10'($urandom_range(320, 420)),
                  b: 10'($urandom_range(320, 420))};
    db_count = AW'(NDB);
    for (int i = 0; i < NDB; i++) begin
      @(negedge clk);
      host_we = 1; host_addr = AW'(i); host_data = w565(face[i]);
    end
    @(negedge clk);
    host_we = 0;

    // every pixel one 5-bit step brighter in red: within TOL
    q = {face[0]};
    play(q);
    q = {};
    foreach (face[i]) q.push_back('{r: face[i].r + 10'd32, g: face[i].g, b: face[i].b});
    play(q);
    wait_result(m, cnt, mm, ov, cc);
    check(m && mm == 0, $sformatf("one step everywhere: m=%0d mm=%0d", m, mm));
    @(negedge clk);
    check(lock_gpio, "unlocked within tolerance");
    relock = 1; @(negedge clk); relock = 0;

    // one pixel two steps off: one mismatch, allowed
    q = {face[0]};
    play(q);
    q = {};
    foreach (face[i]) q.push_back(face[i]);
    q[1].b = q[1].b + 10'd64;
    play(q);
    wait_result(m, cnt, mm, ov, cc);
    check(m && mm == 1, $sformatf("one pixel off: m=%0d mm=%0d", m, mm));
    @(negedge clk);
    check(lock_gpio, "unlocked with one mismatch");
    relock = 1; @(negedge clk); relock = 0;

    // two pixels two steps off: rejected
    q = {face[0]};
    play(q);
    q = {};
    foreach (face[i]) q.push_back(face[i]);
    q[1].b = q[1].b + 10'd64;
    q[3].g = q[3].g - 10'd32;
    play(q);
    wait_result(m, cnt, mm, ov, cc);
    check(!m && mm == 2, $sformatf("two pixels off: m=%0d mm=%0d", m, mm));
    @(negedge clk);
    check(!lock_gpio, "locked with two mismatches");
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
