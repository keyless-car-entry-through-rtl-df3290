// tb_sram_ctrl: streams random writes (one per clock) into the behavioural
// SRAM, then streams reads back and checks data and the two-clock read
// latency, and the pin levels of one write and one read cycle.
`timescale 1ns/1ps
module tb_sram_ctrl;

  localparam int unsigned AW = 18, N = 300;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  initial begin #1 rst_n = 1; #1 rst_n = 0; end  // a falling edge applies the asynchronous reset

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  logic          req = 0, we = 0, rvalid;
  logic [AW-1:0] addr = '0, sram_addr;
  logic [15:0]   wdata = '0, rdata, dq_o, dq_i;
  logic          dq_oe, we_n, oe_n, ce_n, ub_n, lb_n;

  sram_ctrl #(.AW(AW)) dut (.clk, .rst_n, .req, .we, .addr, .wdata, .rvalid, .rdata,
    .sram_addr, .sram_dq_o(dq_o), .sram_dq_oe(dq_oe), .sram_dq_i(dq_i),
    .sram_we_n(we_n), .sram_oe_n(oe_n), .sram_ce_n(ce_n), .sram_ub_n(ub_n), .sram_lb_n(lb_n));

  sram_model #(.AW(AW)) u_mem (.clk, .addr(sram_addr), .dq_o, .dq_oe, .dq_i, .we_n, .oe_n, .ce_n);

  logic [AW-1:0] a [N];
  logic [15:0]   d [N];
  int cyc = 0, n_rd = 0;
  int t_req [N];
  always @(posedge clk) begin
    cyc++;
    if (rvalid) begin
      check(rdata == d[n_rd], $sformatf("read %0d at %h: %h expected %h", n_rd, a[n_rd], rdata, d[n_rd]));
      check(cyc - t_req[n_rd] == 2, $sformatf("read latency %0d", cyc - t_req[n_rd]));
      n_rd++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(ce_n && we_n && oe_n && !dq_oe, "pins idle after reset");
    for (int i = 0; i < N; i++) begin
      a[i] = AW'(i * 797 + 13);
      d[i] = 16'($urandom);
    end
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      req = 1; we = 1; addr = a[i]; wdata = d[i];
      if (i == 5) begin
        @(negedge clk);
        check(!ce_n && !we_n && oe_n && dq_oe && sram_addr == a[5] && dq_o == d[5], "write cycle pins");
        req = 0;
      end
    end
    @(negedge clk);
    req = 0;
    @(negedge clk);
    check(ce_n && we_n && oe_n, "pins idle between bursts");
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      req = 1; we = 0; addr = a[i]; t_req[i] = cyc + 1;
    end
    @(negedge clk);
    req = 0;
    check(!ce_n && we_n && !oe_n && !dq_oe, "read cycle pins");
    repeat (4) @(negedge clk);
    check(n_rd == N, $sformatf("reads returned %0d", n_rd));
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
