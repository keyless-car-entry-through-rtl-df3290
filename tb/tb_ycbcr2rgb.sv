// tb_ycbcr2rgb: random and corner YCbCr inputs, one per clock; each RGB
// output is compared with the BT.601 equations in floating point (times 4
// for 10 bits, clipped to 0..1023) within +-2, and must appear 2 clocks
// after its input.
`timescale 1ns/1ps
module tb_ycbcr2rgb;
  import face_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin #1 rst_n = 1; #1 rst_n = 0; end  // a falling edge applies the asynchronous reset

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  logic       in_valid = 0, ov;
  ycbcr_t     in_pix = '0;
  logic [9:0] in_x = '0, ox;
  rgb10_t     orgb;

  ycbcr2rgb dut (.clk, .rst_n, .in_valid, .in_pix, .in_x, .out_valid(ov), .out_rgb(orgb), .out_x(ox));

  function automatic int ref10(real v);
    v = v * 4.0;
    if (v < 0.0) return 0;
    if (v > 1023.0) return 1023;
    return int'(v);
  endfunction

  localparam int N = 600;
  ycbcr_t sent [N];
  int t_in [N];
  int cyc = 0, n_out = 0;

  function automatic bit near(logic [9:0] a, int b);
    return (int'(a) - b <= 2) && (b - int'(a) <= 2);
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (ov) begin
      ycbcr_t p;
      real y, u, v;
      int r, g, b;
      p = sent[ox];
      y = 1.164 * (real'(p.y) - 16.0);
      u = real'(p.cb) - 128.0;
      v = real'(p.cr) - 128.0;
      r = ref10(y + 1.596 * v);
      g = ref10(y - 0.813 * v - 0.392 * u);
      b = ref10(y + 2.017 * u);
      check(near(orgb.r, r) && near(orgb.g, g) && near(orgb.b, b),
            $sformatf("in %h: got %0d %0d %0d, expected %0d %0d %0d", p, orgb.r, orgb.g, orgb.b, r, g, b));
      check(cyc - t_in[ox] == 2, "latency 2");
      n_out++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      case (i)
        0: sent[i] = '{y: 8'd16,  cb: 8'd128, cr: 8'd128};   // black
        1: sent[i] = '{y: 8'd235, cb: 8'd128, cr: 8'd128};   // white
        2: sent[i] = '{y: 8'd96,  cb: 8'd128, cr: 8'd128};   // face gray
        3: sent[i] = '{y: 8'd255, cb: 8'd255, cr: 8'd255};   // clip high
        4: sent[i] = '{y: 8'd0,   cb: 8'd0,   cr: 8'd0};     // clip low
        default: sent[i] = '{y: 8'($urandom), cb: 8'($urandom), cr: 8'($urandom)};
      endcase
      @(negedge clk);
      in_valid = 1; in_pix = sent[i]; in_x = 10'(i); t_in[i] = cyc + 1;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(negedge clk);
    check(n_out == N, $sformatf("outputs %0d", n_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
