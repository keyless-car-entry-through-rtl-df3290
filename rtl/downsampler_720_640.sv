// downsampler_720_640: reduces each 720-sample 4:2:2 line to 640 samples.
//
// Samples travel in Cb/Cr pairs (columns 2k and 2k+1 share one chroma
// pair), so the block drops whole pairs to keep the chroma order intact:
// of every 9 pairs (18 samples) the ninth is dropped, leaving 8 of 9, i.e.
// 360 pairs -> 320 pairs = 640 samples. Kept samples are renumbered
// 0..639 in out_x. The drop pattern is this design's choice; the document
// only says the line goes from 720 to 640 pixels.
//
// Interface: the word stream of itu656_decoder (valid, word, in_sol marks
// column 0). Timing: one clock of latency; a dropped sample produces no
// out_valid.
module downsampler_720_640
  import face_pkg::*;
#(
  parameter int unsigned KEEP  = 8,   // pairs kept ...
  parameter int unsigned GROUP = 9    // ... out of every GROUP pairs
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  yc422_t     in_word,
  input  logic       in_sol,
  input  logic [8:0] in_line,
  input  logic       in_field,
  output logic       out_valid,
  output yc422_t     out_word,
  output logic [9:0] out_x,
  output logic [8:0] out_line,
  output logic       out_field
);

  logic [3:0] pair_ph;      // position of the current pair in its group
  logic       odd;          // second sample of a pair
  logic [9:0] ocol;         // next output column

  // values as seen by the current input sample (in_sol restarts the line)
  logic [3:0] ph_now;
  logic       odd_now;
  logic [9:0] col_now;
  always_comb begin
    ph_now  = in_sol ? 4'd0  : pair_ph;
    odd_now = in_sol ? 1'b0  : odd;
    col_now = in_sol ? 10'd0 : ocol;
  end

  wire keep = (ph_now < 4'(KEEP));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pair_ph   <= '0;
      odd       <= 1'b0;
      ocol      <= '0;
      out_valid <= 1'b0;
      out_word  <= '0;
      out_x     <= '0;
      out_line  <= '0;
      out_field <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        odd <= ~odd_now;
        if (odd_now) pair_ph <= (ph_now == 4'(GROUP - 1)) ? 4'd0 : ph_now + 4'd1;
        else         pair_ph <= ph_now;
        if (keep) begin
          out_valid <= 1'b1;
          out_word  <= in_word;
          out_x     <= col_now;
          out_line  <= in_line;
          out_field <= in_field;
          ocol      <= col_now + 10'd1;
        end else begin
          ocol      <= col_now;
        end
      end
    end
  end

endmodule
