// vga_timing: raster generator for the 640 x 480 VGA output.
//
// Two counters walk the full raster (visible area, front porch, sync pulse
// and back porch) once per frame. The default numbers are the standard
// 640 x 480 at 60 Hz timing for a 25.175 MHz pixel clock (800 clocks per
// line, 525 lines per frame, both syncs active low); the document names the
// VGA timing generator but gives no numbers, so these are this design's
// choice.
//
// Interface: hcount/vcount are the raster position; active is high in the
// visible area; hsync_n/vsync_n are the sync outputs; sof pulses on the
// first clock of a frame (0,0). Timing: all outputs are registered and
// change together on each clock.
module vga_timing #(
  parameter int unsigned H_VIS   = 640,
  parameter int unsigned H_FP    = 16,
  parameter int unsigned H_SYNC  = 96,
  parameter int unsigned H_BP    = 48,
  parameter int unsigned V_VIS   = 480,
  parameter int unsigned V_FP    = 10,
  parameter int unsigned V_SYNC  = 2,
  parameter int unsigned V_BP    = 33
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       active,
  output logic       hsync_n,
  output logic       vsync_n,
  output logic       sof
);

  localparam int unsigned H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_VIS + V_FP + V_SYNC + V_BP;

  logic [9:0] h, v;
  logic [9:0] h_n, v_n;

  always_comb begin
    h_n = h + 10'd1;
    v_n = v;
    if (h == 10'(H_TOT - 1)) begin
      h_n = '0;
      v_n = (v == 10'(V_TOT - 1)) ? 10'd0 : v + 10'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h <= '0;
      v <= '0;
    end else begin
      h <= h_n;
      v <= v_n;
    end
  end

  always_comb begin
    hcount  = h;
    vcount  = v;
    active  = (h < 10'(H_VIS)) && (v < 10'(V_VIS));
    hsync_n = !((h >= 10'(H_VIS + H_FP)) && (h < 10'(H_VIS + H_FP + H_SYNC)));
    vsync_n = !((v >= 10'(V_VIS + V_FP)) && (v < 10'(V_VIS + V_FP + V_SYNC)));
    sof     = (h == 10'd0) && (v == 10'd0);
  end

endmodule
