// ycbcr2rgb: ITU-R BT.601 YCbCr (8-bit, studio range) to 10-bit RGB.
//
//   R = 1.164 (Y-16) + 1.596 (Cr-128)
//   G = 1.164 (Y-16) - 0.813 (Cr-128) - 0.392 (Cb-128)
//   B = 1.164 (Y-16) + 2.017 (Cb-128)
//
// The coefficients are held as integers scaled by 256 (298, 409, 208, 100,
// 516). The 8-bit result is wanted times 4 for the 10-bit DAC, so the sums
// are divided by 64 with rounding and clipped to 0..1023. The document says
// only that this stage turns YCbCr into 10-bit RGB; the BT.601 equations and
// their fixed-point form are this design's choice.
//
// Interface: in_valid/in_pix/in_x; out_valid/out_rgb/out_x.
// Timing: two pipeline stages (products, then sum and clip): 2 clocks.
module ycbcr2rgb
  import face_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  ycbcr_t     in_pix,
  input  logic [9:0] in_x,
  output logic       out_valid,
  output rgb10_t     out_rgb,
  output logic [9:0] out_x
);

  localparam int signed K_Y   = 298;
  localparam int signed K_RV  = 409;
  localparam int signed K_GV  = 208;
  localparam int signed K_GU  = 100;
  localparam int signed K_BU  = 516;

  // stage 1: products
  logic signed [19:0] py, prv, pgv, pgu, pbu;
  logic               v1;
  logic [9:0]         x1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; x1 <= '0;
      py <= '0; prv <= '0; pgv <= '0; pgu <= '0; pbu <= '0;
    end else begin
      v1  <= in_valid;
      x1  <= in_x;
      py  <= 20'(K_Y  * (int'(in_pix.y)  - 16));
      prv <= 20'(K_RV * (int'(in_pix.cr) - 128));
      pgv <= 20'(K_GV * (int'(in_pix.cr) - 128));
      pgu <= 20'(K_GU * (int'(in_pix.cb) - 128));
      pbu <= 20'(K_BU * (int'(in_pix.cb) - 128));
    end
  end

  function automatic logic [9:0] clip10(logic signed [21:0] s);
    logic signed [21:0] q;
    q = (s + 22'sd32) >>> 6;
    if (q < 0)            return 10'd0;
    else if (q > 22'sd1023) return 10'd1023;
    else                  return q[9:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_rgb   <= '0;
      out_x     <= '0;
    end else begin
      out_valid <= v1;
      out_x     <= x1;
      out_rgb.r <= clip10(22'(py) + 22'(prv));
      out_rgb.g <= clip10(22'(py) - 22'(pgv) - 22'(pgu));
      out_rgb.b <= clip10(22'(py) + 22'(pbu));
    end
  end

endmodule
