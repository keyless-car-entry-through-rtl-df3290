// itu656_decoder: splits an ITU-R BT.656 byte stream into 4:2:2 samples.
//
// The TV decoder chip sends, per line, a timing reference code FF 00 00 XY
// (XY bit 6 = field F, bit 5 = vertical blanking V, bit 4 = H: 0 for start of
// active video, 1 for end), followed after SAV by 1440 bytes in the order
// Cb Y Cr Y Cb Y Cr Y ... for 720 active samples. This block watches for the
// code, and on lines with V = 0 emits one word per luma byte: {Y, C} where C
// is the chroma byte just before it, so even columns carry Cb and odd
// columns Cr. The line counter restarts at 0 on the first active line after
// vertical blanking, so out_line counts lines within a field.
//
// Interface: one byte per clock on td_data (the 27 MHz TD_CLK domain).
// out_valid pulses on every second clock during active video; out_x is the
// column (0..719), out_line the line in the field, out_field the F bit.
// Timing: a word is registered one clock after its luma byte.
// The 656 framing follows the standard; the document only names the block.
module itu656_decoder
  import face_pkg::*;
#(
  parameter int unsigned COLS = IN_COLS   // active samples per line
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [7:0]   td_data,
  output logic         out_valid,
  output yc422_t       out_word,
  output logic [9:0]   out_x,
  output logic [8:0]   out_line,
  output logic         out_field,
  output logic         out_sol        // first word of an active line
);

  logic [7:0]  d1, d2, d3;            // last three bytes
  logic        active;                // inside an active line
  logic [11:0] bcnt;                  // byte index within the active line
  logic [7:0]  chroma;
  logic        in_vblank;
  logic [8:0]  line;
  logic        field;

  wire trs = (d3 == 8'hFF) && (d2 == 8'h00) && (d1 == 8'h00);
  wire f_bit = td_data[6];
  wire v_bit = td_data[5];
  wire h_bit = td_data[4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1 <= '0; d2 <= '0; d3 <= '0;
      active    <= 1'b0;
      bcnt      <= '0;
      chroma    <= '0;
      in_vblank <= 1'b1;
      line      <= '0;
      field     <= 1'b0;
      out_valid <= 1'b0;
      out_word  <= '0;
      out_x     <= '0;
      out_line  <= '0;
      out_field <= 1'b0;
      out_sol   <= 1'b0;
    end else begin
      d1 <= td_data;
      d2 <= d1;
      d3 <= d2;
      out_valid <= 1'b0;
      out_sol   <= 1'b0;
      if (trs) begin
        active <= 1'b0;
        if (v_bit) begin
          in_vblank <= 1'b1;
        end else if (!h_bit) begin
          // start of active video on a picture line
          active    <= 1'b1;
          bcnt      <= '0;
          field     <= f_bit;
          in_vblank <= 1'b0;
          line      <= in_vblank ? 9'd0 : line + 9'd1;
        end
      end else if (active) begin
        if (!bcnt[0]) begin
          chroma <= td_data;
        end else begin
          out_valid <= 1'b1;
          out_word  <= '{y: td_data, c: chroma};
          out_x     <= 10'(bcnt >> 1);
          out_line  <= line;
          out_field <= field;
          out_sol   <= (bcnt == 12'd1);
        end
        if (bcnt == 12'(2 * COLS - 1)) active <= 1'b0;
        bcnt <= bcnt + 12'd1;
      end
    end
  end

endmodule
