// face_recognizer: saves the detected face to SRAM, compares it with the
// enrolled face and opens the lock.
//
// The SRAM holds two regions of REGION words each: the enrolled face
// (database) at DB_BASE, written beforehand by a host through the host_*
// port, and the captured face at CAP_BASE. One word is one face pixel in
// RGB 5-6-5. Pixels are stored one per address in scan order: row 1 from
// left to right, then row 2 from column 1, and so on, keeping only face
// pixels.
//
// Sequence (state machine):
//   WATCH    a frame ends in which face_detect saw a face pixel -> CAPTURE
//   CAPTURE  during the next whole frame every face pixel is written to
//            CAP_BASE + n (n counts up); pixels beyond REGION set overflow.
//            At the frame's end -> COMPARE.
//   COMPARE  unless the count differs from db_count, is zero, or overflowed,
//            reads capture[i] and database[i] for every i (4 clocks per
//            pixel) and counts the pixels whose channels differ by more
//            than TOL.
//   result   match = equal counts and at most MAX_MISMATCH differing
//            pixels. On a match -> UNLOCKED, otherwise back to WATCH.
//   UNLOCKED lock_gpio = 1 (the document's "logic 1 to the GPIO" that drives
//            the lock motor) until relock -> WATCH.
// The host port is accepted (host_ready) only in WATCH and UNLOCKED, when
// the SRAM is otherwise idle.
//
// From the document: saving face pixels in scan order, one per address;
// comparing with the stored face; "same" opens the lock (TOL = 0,
// MAX_MISMATCH = 0 by default). This design's choices: the two regions,
// capturing the frame after the one in which the face appeared, the 5-6-5
// word, the pixel count check, the tolerance parameters and relock.
//
// Timing: one SRAM write per face pixel at pixel rate while capturing; the
// comparison takes 4 clocks per stored pixel plus 2; result_valid pulses
// for one clock with match, mismatches and cap_count.
module face_recognizer
  import face_pkg::*;
#(
  parameter int unsigned AW           = 18,
  parameter int unsigned REGION       = 131072,  // words per region
  parameter int unsigned DB_BASE      = 0,
  parameter int unsigned CAP_BASE     = 131072,
  parameter int unsigned TOL          = 0,       // per-channel difference allowed (5/6-bit units)
  parameter int unsigned MAX_MISMATCH = 0        // differing pixels allowed
) (
  input  logic          clk,
  input  logic          rst_n,
  // pixel stream from face_detect
  input  logic          px_valid,
  input  logic          px_face,
  input  rgb10_t        px_raw,
  input  logic          frame_end,
  input  logic          face_seen,
  // host loading of the enrolled face
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,     // offset inside the database region
  input  logic [15:0]   host_data,
  input  logic [AW-1:0] db_count,      // number of enrolled face pixels
  output logic          host_ready,
  input  logic          relock,
  // SRAM controller port
  output logic          mem_req,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [15:0]   mem_wdata,
  input  logic          mem_rvalid,
  input  logic [15:0]   mem_rdata,
  // results
  output logic          lock_gpio,     // 1 = lock opened
  output logic          capturing,
  output logic          comparing,
  output logic          result_valid,
  output logic          match,
  output logic          overflow,
  output logic [AW-1:0] cap_count,
  output logic [AW-1:0] mismatches
);

  typedef enum logic [2:0] {
    S_WATCH, S_CAPTURE, S_CHECK, S_RD_CAP, S_RD_DB, S_WAIT, S_CMP, S_UNLOCKED
  } state_t;

  state_t        state;
  logic [AW-1:0] idx;
  logic [15:0]   cap_word;

  function automatic logic close(logic [15:0] a, logic [15:0] b);
    int dr, dg, db;
    dr = int'(a[15:11]) - int'(b[15:11]);
    dg = int'(a[10:5])  - int'(b[10:5]);
    db = int'(a[4:0])   - int'(b[4:0]);
    if (dr < 0) dr = -dr;
    if (dg < 0) dg = -dg;
    if (db < 0) db = -db;
    return (dr <= int'(TOL)) && (dg <= int'(TOL)) && (db <= int'(TOL));
  endfunction

  always_comb begin
    host_ready = (state == S_WATCH) || (state == S_UNLOCKED);
    lock_gpio  = (state == S_UNLOCKED);
    capturing  = (state == S_CAPTURE);
    comparing  = (state == S_RD_CAP) || (state == S_RD_DB) ||
                 (state == S_WAIT)   || (state == S_CMP);
    mem_req    = 1'b0;
    mem_we     = 1'b0;
    mem_addr   = '0;
    mem_wdata  = '0;
    unique case (state)
      S_WATCH, S_UNLOCKED: begin
        mem_req   = host_we;
        mem_we    = 1'b1;
        mem_addr  = AW'(DB_BASE) + host_addr;
        mem_wdata = host_data;
      end
      S_CAPTURE: begin
        mem_req   = px_valid && px_face && (cap_count < AW'(REGION));
        mem_we    = 1'b1;
        mem_addr  = AW'(CAP_BASE) + cap_count;
        mem_wdata = pack565(px_raw);
      end
      S_RD_CAP: begin
        mem_req  = 1'b1;
        mem_addr = AW'(CAP_BASE) + idx;
      end
      S_RD_DB: begin
        mem_req  = 1'b1;
        mem_addr = AW'(DB_BASE) + idx;
      end
      default: ;
    endcase
  end

  // mismatch count including the pixel pair being compared in S_CMP
  logic [AW-1:0] mm;
  always_comb
    mm = mismatches + ((mem_rvalid && close(cap_word, mem_rdata)) ? AW'(0) : AW'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_WATCH;
      idx          <= '0;
      cap_word     <= '0;
      cap_count    <= '0;
      mismatches   <= '0;
      overflow     <= 1'b0;
      result_valid <= 1'b0;
      match        <= 1'b0;
    end else begin
      result_valid <= 1'b0;
      unique case (state)
        S_WATCH: begin
          if (frame_end && face_seen) begin
            state      <= S_CAPTURE;
            cap_count  <= '0;
            mismatches <= '0;
            overflow   <= 1'b0;
          end
        end
        S_CAPTURE: begin
          if (px_valid && px_face) begin
            if (cap_count < AW'(REGION)) cap_count <= cap_count + 1'b1;
            else                         overflow  <= 1'b1;
          end
          if (frame_end) state <= S_CHECK;
        end
        S_CHECK: begin
          idx <= '0;
          if (overflow || cap_count == '0 || cap_count != db_count) begin
            result_valid <= 1'b1;
            match        <= 1'b0;
            state        <= S_WATCH;
          end else begin
            state <= S_RD_CAP;
          end
        end
        S_RD_CAP: state <= S_RD_DB;
        S_RD_DB:  state <= S_WAIT;
        S_WAIT: begin
          if (mem_rvalid) cap_word <= mem_rdata;
          state <= S_CMP;
        end
        S_CMP: begin
          mismatches <= mm;
          if (idx == cap_count - 1'b1) begin
            result_valid <= 1'b1;
            match        <= (mm <= AW'(MAX_MISMATCH));
            state        <= (mm <= AW'(MAX_MISMATCH)) ? S_UNLOCKED : S_WATCH;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_RD_CAP;
          end
        end
        S_UNLOCKED: begin
          if (relock) state <= S_WATCH;
        end
        default: state <= S_WATCH;
      endcase
    end
  end

  // the capture write must never be displaced by a host write
  a_no_host_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !host_ready |-> !(mem_req && mem_we && mem_addr < AW'(DB_BASE + REGION) && state != S_CAPTURE));

endmodule
