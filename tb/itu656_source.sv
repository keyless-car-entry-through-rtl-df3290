// itu656_source: testbench video source producing an NTSC-like ITU-R BT.656
// byte stream (behavioural; stands in for camera plus TV decoder chip).
//
// Each field has VBL lines of vertical blanking (V = 1) followed by ROWS
// picture lines; each line is EAV (FF 00 00 XY, H = 1), HBL blanking bytes
// (80 10 ...), SAV (H = 0) and 2*COLS active bytes Cb Y Cr Y. Fields
// alternate F = 0, 1. The picture is black (Y 16, Cb = Cr = 128) with a
// gray rectangle of luma face_y over input columns [x0, x1) and field
// lines [l0, l1); face_y = 16 gives a black picture.
// frame_count counts completed frames (after field 1).
module itu656_source #(
  parameter int unsigned COLS = 720,
  parameter int unsigned ROWS = 240,
  parameter int unsigned VBL  = 22,
  parameter int unsigned HBL  = 268
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  face_y,
  input  int unsigned x0, x1, l0, l1,
  output logic [7:0]  td_data,
  output int unsigned frame_count
);

  localparam int unsigned LINE_BYTES = 8 + HBL + 2 * COLS;

  int unsigned bp, ln;
  logic        f;

  function automatic logic [7:0] xy(logic fb, logic vb, logic hb);
    return {1'b1, fb, vb, hb, vb ^ hb, fb ^ hb, fb ^ vb, fb ^ vb ^ hb};
  endfunction

  function automatic logic [7:0] byte_at(int unsigned b, int unsigned l, logic fb,
                                         logic [7:0] fy, int unsigned ax0, int unsigned ax1,
                                         int unsigned al0, int unsigned al1);
    logic vb;
    int unsigned a, col, pl;
    vb = (l < VBL);
    if (b < 4)              return (b == 0) ? 8'hFF : (b == 3) ? xy(fb, vb, 1'b1) : 8'h00;
    if (b < 4 + HBL)        return ((b - 4) % 2 == 0) ? 8'h80 : 8'h10;
    if (b < 8 + HBL) begin
      a = b - 4 - HBL;
      return (a == 0) ? 8'hFF : (a == 3) ? xy(fb, vb, 1'b0) : 8'h00;
    end
    a = b - 8 - HBL;
    if (vb || a[0] == 1'b0) return (vb && a[0]) ? 8'h10 : 8'h80;   // chroma or blank
    col = a / 2;
    pl  = l - VBL;
    if (col >= ax0 && col < ax1 && pl >= al0 && pl < al1) return fy;
    return 8'd16;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bp <= 0; ln <= 0; f <= 1'b0; frame_count <= 0; td_data <= 8'h10;
    end else begin
      td_data <= byte_at(bp, ln, f, face_y, x0, x1, l0, l1);
      if (bp == LINE_BYTES - 1) begin
        bp <= 0;
        if (ln == VBL + ROWS - 1) begin
          ln <= 0;
          f  <= ~f;
          if (f) frame_count <= frame_count + 1;
        end else ln <= ln + 1;
      end else bp <= bp + 1;
    end
  end

endmodule
