// face_detect: finds face pixels against a black background.
//
// The camera looks at a black background. A pixel whose three 10-bit
// channels all lie below BG_MAX is background (the document measures the
// background at 0..50 in 8-bit units and scales by 4 for the 10-bit VGA
// path: 200). A pixel whose three channels all lie strictly between
// FACE_LO and FACE_HI (300 and 450, the range the document measured on a
// face) is a face pixel. Anything else distorts the background but is not
// counted as face. When mask_en is set, face pixels are replaced by white
// on the way to the VGA output, so the detected face can be seen.
//
// Per frame the block reports the first face pixel (first_face pulse with
// its column and row) and, on the frame's last pixel, whether any face
// pixel was seen (frame_end pulse with face_seen) and whether any pixel
// disturbed the black background (disturbed). Applying the limits to
// each channel separately is this design's reading of "RGB".
//
// Interface: in_valid/in_rgb/in_x/in_y in raster order; the frame ends at
// column COLS-1 of row ROWS-1. Timing: all outputs are registered, one
// clock after the pixel.
module face_detect
  import face_pkg::*;
#(
  parameter int unsigned COLS    = H_ACTIVE,
  parameter int unsigned ROWS    = V_ACTIVE,
  parameter int unsigned BG_MAX  = 200,
  parameter int unsigned FACE_LO = 300,
  parameter int unsigned FACE_HI = 450
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mask_en,
  input  logic       in_valid,
  input  rgb10_t     in_rgb,
  input  logic [9:0] in_x,
  input  logic [9:0] in_y,
  output logic       out_valid,
  output rgb10_t     out_rgb,      // masked picture for the VGA
  output rgb10_t     out_raw,      // unmasked pixel for storage
  output logic [9:0] out_x,
  output logic [9:0] out_y,
  output logic       out_face,
  output logic       out_bg,
  output logic       first_face,
  output logic       frame_end,
  output logic       face_seen,
  output logic       disturbed
);

  function automatic logic in_range(logic [9:0] v, int unsigned lo, int unsigned hi);
    return (int'(v) > int'(lo)) && (int'(v) < int'(hi));
  endfunction

  wire is_face = in_range(in_rgb.r, FACE_LO, FACE_HI) &&
                 in_range(in_rgb.g, FACE_LO, FACE_HI) &&
                 in_range(in_rgb.b, FACE_LO, FACE_HI);
  wire is_bg   = (int'(in_rgb.r) < int'(BG_MAX)) &&
                 (int'(in_rgb.g) < int'(BG_MAX)) &&
                 (int'(in_rgb.b) < int'(BG_MAX));
  wire is_first_px = (in_x == 10'd0) && (in_y == 10'd0);
  wire is_last_px  = (in_x == 10'(COLS - 1)) && (in_y == 10'(ROWS - 1));

  logic seen;   // a face pixel has appeared earlier in this frame
  logic dist_seen;   // a non-background pixel has appeared earlier in this frame
  wire  seen_before = seen && !is_first_px;
  wire  dist_before = dist_seen && !is_first_px;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen       <= 1'b0;
      dist_seen       <= 1'b0;
      disturbed  <= 1'b0;
      out_valid  <= 1'b0;
      out_rgb    <= '0;
      out_raw    <= '0;
      out_x      <= '0;
      out_y      <= '0;
      out_face   <= 1'b0;
      out_bg     <= 1'b0;
      first_face <= 1'b0;
      frame_end  <= 1'b0;
      face_seen  <= 1'b0;
    end else begin
      out_valid  <= in_valid;
      first_face <= 1'b0;
      frame_end  <= 1'b0;
      if (in_valid) begin
        out_raw    <= in_rgb;
        out_rgb    <= (is_face && mask_en) ? '{r: 10'h3FF, g: 10'h3FF, b: 10'h3FF} : in_rgb;
        out_x      <= in_x;
        out_y      <= in_y;
        out_face   <= is_face;
        out_bg     <= is_bg;
        first_face <= is_face && !seen_before;
        seen       <= seen_before || is_face;
        dist_seen       <= dist_before || !is_bg;
        if (is_last_px) begin
          frame_end <= 1'b1;
          face_seen <= seen_before || is_face;
          disturbed <= dist_before || !is_bg;
        end
      end
    end
  end

endmodule
