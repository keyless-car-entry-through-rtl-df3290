// face_pkg: types and constants shared by the face-recognition car-lock design.
//
// The video path carries three kinds of data: 4:2:2 words as they come from
// the ITU-R 656 stream ({Y, Cb} on even columns, {Y, Cr} on odd ones),
// 4:4:4 YCbCr pixels, and 10-bit RGB pixels as the VGA DAC takes them.
// The active picture is 640 x 480 after the 720 -> 640 downsampler; each
// NTSC field contributes 240 of the 480 lines (V_ACTIVE / 2).
package face_pkg;

  localparam int unsigned IN_COLS    = 720;  // active samples per line in the 656 stream
  localparam int unsigned H_ACTIVE   = 640;  // columns after downsampling / on VGA
  localparam int unsigned V_ACTIVE   = 480;  // lines of a frame (two fields)

  // One 4:2:2 sample: luma plus the chroma half (Cb on even, Cr on odd column)
  typedef struct packed {
    logic [7:0] y;
    logic [7:0] c;
  } yc422_t;

  typedef struct packed {
    logic [7:0] y;
    logic [7:0] cb;
    logic [7:0] cr;
  } ycbcr_t;

  typedef struct packed {
    logic [9:0] r;
    logic [9:0] g;
    logic [9:0] b;
  } rgb10_t;

  // SRAM word holding one face pixel: RGB 5-6-5 taken from the top bits of
  // the 10-bit channels.
  function automatic logic [15:0] pack565(rgb10_t p);
    return {p.r[9:5], p.g[9:4], p.b[9:5]};
  endfunction

endpackage
