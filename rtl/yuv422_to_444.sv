// yuv422_to_444: gives every pixel its own Cb and Cr.
//
// In 4:2:2 the pixels 2k and 2k+1 share one chroma pair: Cb arrives with
// pixel 2k and Cr with pixel 2k+1. The block holds the even word until the
// odd word brings Cr, then emits the even pixel, and emits the odd pixel on
// the following clock with the same Cb/Cr pair (chroma is repeated, not
// interpolated: the simplest conversion, chosen here).
//
// Interface: in_valid/in_word/in_x from the frame buffer, columns in order
// starting at an even column. Timing: with words on consecutive clocks
// every pixel leaves exactly 2 clocks after its word enters
// (out_valid/out_pix/out_x).
module yuv422_to_444
  import face_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  yc422_t     in_word,
  input  logic [9:0] in_x,
  output logic       out_valid,
  output ycbcr_t     out_pix,
  output logic [9:0] out_x
);

  logic [7:0] y_even, cb, cr, y_odd;
  logic       pend_odd;
  logic [9:0] x_odd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_even    <= '0;
      cb        <= '0;
      cr        <= '0;
      y_odd     <= '0;
      x_odd     <= '0;
      pend_odd  <= 1'b0;
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_x     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid && in_x[0]) begin
        // odd word: the pair is complete, emit the even pixel now
        out_valid <= 1'b1;
        out_pix   <= '{y: y_even, cb: cb, cr: in_word.c};
        out_x     <= in_x - 10'd1;
        y_odd     <= in_word.y;
        cr        <= in_word.c;
        x_odd     <= in_x;
        pend_odd  <= 1'b1;
      end else if (pend_odd) begin
        out_valid <= 1'b1;
        out_pix   <= '{y: y_odd, cb: cb, cr: cr};
        out_x     <= x_odd;
        pend_odd  <= 1'b0;
      end
      if (in_valid && !in_x[0]) begin
        y_even <= in_word.y;
        cb     <= in_word.c;
      end
    end
  end

endmodule
