// tb_i2c_av_config: an I2C slave model watches SCL/SDA, decodes START,
// bytes and STOP, and pulls SDA low in each acknowledge clock, except for
// the second byte of the very first transfer, which it leaves unacknowledged.
// Checks: the first transfer is repeated after the NACK, every register
// entry arrives as {device, register, value} in table order, SDA changes
// only while SCL is low inside a transfer, the SCL period is 4 * QDIV
// clocks, and done rises at the end.
`timescale 1ns/1ps
module tb_i2c_av_config;

  localparam int unsigned QDIV = 4, N = 3;
  localparam logic [N-1:0][23:0] REGS = {24'h40_17_41, 24'h40_15_00, 24'h40_00_00};

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  initial begin #1 rst_n = 1; #1 rst_n = 0; end  // a falling edge applies the asynchronous reset

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  logic scl, sda_oe, done, nack_seen;
  logic slave_pull = 0;
  wire  sda = !(sda_oe || slave_pull);

  i2c_av_config #(.QDIV(QDIV), .N_REGS(N), .REGS(REGS)) dut (.clk, .rst_n, .scl, .sda_oe,
    .sda_i(sda), .done, .nack_seen);

  // slave model, sampled on the system clock
  logic scl_q = 1, sda_q = 1;
  bit   in_xfer = 0;
  int   nbits = 0, nbytes = 0, xfers = 0, cyc = 0, last_rise = -1;
  logic [7:0]  sh;
  logic [23:0] got;
  logic [23:0] seen [$];
  bit          first_nack_done = 0, this_nacked = 0;
  always @(posedge clk) begin
    cyc++;
    scl_q <= scl;
    sda_q <= sda;
    if (rst_n) begin
      if (scl && scl_q && sda_q && !sda) begin          // START
        in_xfer = 1; nbits = 0; nbytes = 0; got = '0; this_nacked = 0;
      end else if (scl && scl_q && !sda_q && sda) begin // STOP
        if (in_xfer) begin
          check(nbytes == 3, $sformatf("three bytes per transfer (%0d)", nbytes));
          if (!this_nacked) seen.push_back(got);
          xfers++;
        end
        in_xfer = 0;
      end else if (in_xfer && scl_q && scl && sda != sda_q) begin
        check(0, "SDA changed while SCL high");
      end
      if (in_xfer && scl && !scl_q) begin               // SCL rising: sample
        if (last_rise >= 0 && nbits != 0) check(cyc - last_rise == 4 * QDIV, "SCL period");
        last_rise = cyc;
        if (nbits < 8) sh = {sh[6:0], sda};
        nbits++;
      end
      if (in_xfer && !scl && scl_q) begin               // SCL falling: drive ack
        if (nbits == 8) begin
          got = {got[15:0], sh};
          nbytes++;
          if (!first_nack_done && xfers == 0 && nbytes == 2) begin
            first_nack_done = 1;
            this_nacked = 1;
            slave_pull <= 0;
          end else begin
            slave_pull <= 1;
          end
        end else if (nbits == 9) begin
          slave_pull <= 0;
          nbits = 0;
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    repeat (10) @(posedge clk);
    check(xfers == N + 1, $sformatf("transfers %0d (one repeated)", xfers));
    check(nack_seen, "NACK reported");
    check(seen.size() == N, $sformatf("acknowledged transfers %0d", seen.size()));
    for (int i = 0; i < N && i < seen.size(); i++)
      check(seen[i] == REGS[i], $sformatf("entry %0d: %h expected %h", i, seen[i], REGS[i]));
    check(scl && !sda_oe, "bus released at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
