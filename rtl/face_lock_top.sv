// face_lock_top: keyless car entry by face recognition on a black
// background.
//
// Video path (TD_CLK domain, 27 MHz): the TV decoder's ITU-R 656 bytes are
// split into 4:2:2 samples (itu656_decoder), cut from 720 to 640 columns
// (downsampler_720_640) and written into the frame buffer, which weaves the
// two fields into one 640 x 480 frame. i2c_av_config sets up the decoder
// chip after reset.
//
// Display and recognition path (VGA clock domain, 25 MHz): vga_timing walks
// the raster and reads the frame buffer in order; yuv422_to_444 and
// ycbcr2rgb turn the words into 10-bit RGB; face_detect classifies every
// pixel, masks face pixels white when mask_en is set, and reports whether a
// frame held a face. face_recognizer then saves the next frame's face
// pixels to the external SRAM (through sram_ctrl), compares them with the
// enrolled face that a host loaded into the SRAM, and raises lock_gpio when
// they are the same. lock_gpio drives the lock motor's driver on the board.
//
// Timing: the display pipeline is PIPE = 6 clocks deep (frame buffer 1,
// 4:2:2 to 4:4:4 2, colour conversion 2, detection 1); the syncs and the
// blanking are delayed by the same amount so they line up with the pixels.
// The two clock domains share only the frame buffer, as on the original
// board; rst_n resets both.
module face_lock_top
  import face_pkg::*;
#(
  parameter int unsigned AW     = 18,        // SRAM address bits (256K x 16)
  parameter int unsigned REGION = 131072     // SRAM words per face region
) (
  input  logic          td_clk,
  input  logic          vga_clk,
  input  logic          rst_n,
  // TV decoder
  input  logic [7:0]    td_data,
  output logic          i2c_scl,
  output logic          i2c_sda_oe,
  input  logic          i2c_sda_i,
  output logic          i2c_done,
  output logic          i2c_nack,
  // VGA DAC
  input  logic          mask_en,
  output logic [9:0]    vga_r,
  output logic [9:0]    vga_g,
  output logic [9:0]    vga_b,
  output logic          vga_hs_n,
  output logic          vga_vs_n,
  output logic          vga_blank_n,
  // SRAM pins
  output logic [AW-1:0] sram_addr,
  output logic [15:0]   sram_dq_o,
  output logic          sram_dq_oe,
  input  logic [15:0]   sram_dq_i,
  output logic          sram_we_n,
  output logic          sram_oe_n,
  output logic          sram_ce_n,
  output logic          sram_ub_n,
  output logic          sram_lb_n,
  // host loading of the enrolled face
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  logic [15:0]   host_data,
  input  logic [AW-1:0] db_count,
  output logic          host_ready,
  input  logic          relock,
  // lock and status
  output logic          lock_gpio,
  output logic          face_present,
  output logic          scene_disturbed, // last frame was not all background
  output logic          face_start,      // first face pixel of a frame
  output logic [9:0]    face_start_x,
  output logic [9:0]    face_start_y,
  output logic          capturing,
  output logic          comparing,
  output logic          result_valid,
  output logic          match,
  output logic          overflow,
  output logic [AW-1:0] cap_count,
  output logic [AW-1:0] mismatches
);

  localparam int unsigned PIPE = 6;

  // ---------------- TD_CLK domain ----------------
  logic       dec_valid, dec_sol, dec_field;
  yc422_t     dec_word;
  logic [9:0] dec_x;
  logic [8:0] dec_line;

  itu656_decoder u_dec (
    .clk(td_clk), .rst_n, .td_data,
    .out_valid(dec_valid), .out_word(dec_word), .out_x(dec_x),
    .out_line(dec_line), .out_field(dec_field), .out_sol(dec_sol)
  );

  logic       ds_valid, ds_field;
  yc422_t     ds_word;
  logic [9:0] ds_x;
  logic [8:0] ds_line;

  downsampler_720_640 u_ds (
    .clk(td_clk), .rst_n,
    .in_valid(dec_valid), .in_word(dec_word), .in_sol(dec_sol),
    .in_line(dec_line), .in_field(dec_field),
    .out_valid(ds_valid), .out_word(ds_word), .out_x(ds_x),
    .out_line(ds_line), .out_field(ds_field)
  );

  i2c_av_config u_i2c (
    .clk(td_clk), .rst_n,
    .scl(i2c_scl), .sda_oe(i2c_sda_oe), .sda_i(i2c_sda_i),
    .done(i2c_done), .nack_seen(i2c_nack)
  );

  // ---------------- frame buffer (both domains) ----------------
  logic [9:0] hcount, vcount;
  logic       vis, hs_n, vs_n, sof;
  logic       fb_valid;
  yc422_t     fb_word;

  frame_buffer u_fb (
    .wclk(td_clk), .wr_valid(ds_valid), .wr_x(ds_x), .wr_line(ds_line),
    .wr_field(ds_field), .wr_word(ds_word),
    .rclk(vga_clk), .rd_en(vis), .rd_x(hcount), .rd_y(vcount),
    .rd_valid(fb_valid), .rd_word(fb_word)
  );

  // ---------------- VGA_CLK domain ----------------
  vga_timing u_vga (
    .clk(vga_clk), .rst_n,
    .hcount, .vcount, .active(vis), .hsync_n(hs_n), .vsync_n(vs_n), .sof
  );

  // column of the word leaving the frame buffer
  logic [9:0] fb_x;
  always_ff @(posedge vga_clk or negedge rst_n) begin
    if (!rst_n) fb_x <= '0;
    else        fb_x <= hcount;
  end

  logic       c444_valid;
  ycbcr_t     c444_pix;
  logic [9:0] c444_x;

  yuv422_to_444 u_444 (
    .clk(vga_clk), .rst_n,
    .in_valid(fb_valid), .in_word(fb_word), .in_x(fb_x),
    .out_valid(c444_valid), .out_pix(c444_pix), .out_x(c444_x)
  );

  logic       rgb_valid;
  rgb10_t     rgb_pix;
  logic [9:0] rgb_x;

  ycbcr2rgb u_rgb (
    .clk(vga_clk), .rst_n,
    .in_valid(c444_valid), .in_pix(c444_pix), .in_x(c444_x),
    .out_valid(rgb_valid), .out_rgb(rgb_pix), .out_x(rgb_x)
  );

  // raster signals delayed to line up with the pipeline
  logic [PIPE-1:0] vis_d, hs_d, vs_d;
  logic [9:0]      vcount_d [PIPE];
  always_ff @(posedge vga_clk or negedge rst_n) begin
    if (!rst_n) begin
      vis_d <= '0;
      hs_d  <= '1;
      vs_d  <= '1;
      for (int i = 0; i < PIPE; i++) vcount_d[i] <= '0;
    end else begin
      vis_d <= {vis_d[PIPE-2:0], vis};
      hs_d  <= {hs_d[PIPE-2:0], hs_n};
      vs_d  <= {vs_d[PIPE-2:0], vs_n};
      vcount_d[0] <= vcount;
      for (int i = 1; i < PIPE; i++) vcount_d[i] <= vcount_d[i-1];
    end
  end

  logic       fd_valid, fd_face, fd_bg, fd_first, fd_end, fd_seen, fd_dist;
  rgb10_t     fd_rgb, fd_raw;
  logic [9:0] fd_x, fd_y;

  face_detect u_fd (
    .clk(vga_clk), .rst_n, .mask_en,
    .in_valid(rgb_valid), .in_rgb(rgb_pix), .in_x(rgb_x), .in_y(vcount_d[PIPE-2]),
    .out_valid(fd_valid), .out_rgb(fd_rgb), .out_raw(fd_raw),
    .out_x(fd_x), .out_y(fd_y), .out_face(fd_face), .out_bg(fd_bg),
    .first_face(fd_first), .frame_end(fd_end), .face_seen(fd_seen),
    .disturbed(fd_dist)
  );

  always_ff @(posedge vga_clk or negedge rst_n) begin
    if (!rst_n) begin
      face_present <= 1'b0;
      scene_disturbed <= 1'b0;
      face_start   <= 1'b0;
      face_start_x <= '0;
      face_start_y <= '0;
    end else begin
      face_start <= fd_first;
      if (fd_end) begin
        face_present    <= fd_seen;
        scene_disturbed <= fd_dist;
      end
      if (fd_first) begin
        face_start_x <= fd_x;
        face_start_y <= fd_y;
      end
    end
  end

  always_comb begin
    vga_blank_n = vis_d[PIPE-1];
    vga_hs_n    = hs_d[PIPE-1];
    vga_vs_n    = vs_d[PIPE-1];
    vga_r = vga_blank_n ? fd_rgb.r : '0;
    vga_g = vga_blank_n ? fd_rgb.g : '0;
    vga_b = vga_blank_n ? fd_rgb.b : '0;
  end

  logic          m_req, m_we, m_rvalid;
  logic [AW-1:0] m_addr;
  logic [15:0]   m_wdata, m_rdata;

  face_recognizer #(.AW(AW), .REGION(REGION), .DB_BASE(0), .CAP_BASE(REGION)) u_rec (
    .clk(vga_clk), .rst_n,
    .px_valid(fd_valid), .px_face(fd_face), .px_raw(fd_raw),
    .frame_end(fd_end), .face_seen(fd_seen),
    .host_we, .host_addr, .host_data, .db_count, .host_ready, .relock,
    .mem_req(m_req), .mem_we(m_we), .mem_addr(m_addr), .mem_wdata(m_wdata),
    .mem_rvalid(m_rvalid), .mem_rdata(m_rdata),
    .lock_gpio, .capturing, .comparing, .result_valid, .match, .overflow,
    .cap_count, .mismatches
  );

  sram_ctrl #(.AW(AW), .DW(16)) u_sram (
    .clk(vga_clk), .rst_n,
    .req(m_req), .we(m_we), .addr(m_addr), .wdata(m_wdata),
    .rvalid(m_rvalid), .rdata(m_rdata),
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i,
    .sram_we_n, .sram_oe_n, .sram_ce_n, .sram_ub_n, .sram_lb_n
  );

endmodule
