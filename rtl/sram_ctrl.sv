// sram_ctrl: single-port access to the board's 256K x 16 asynchronous SRAM.
//
// A request (req with we, addr, wdata) is registered and driven onto the
// SRAM pins for one clock: chip enable and both byte lanes are active,
// WE_N is low for a write, OE_N low for a read. For a read the data on the
// pins is sampled at the end of that clock and returned with rvalid. One
// request per clock is accepted, so reads and writes can stream. The pins
// are split into dq_o / dq_oe / dq_i; the bidirectional pad sits outside.
// The document says only that face pixels are stored in and read back from
// the SRAM; the one-clock access assumes the SRAM's access time fits in a
// clock period (a 10 ns part at up to about 50 MHz).
//
// Timing: read data returns 2 clocks after req (rvalid/rdata).
module sram_ctrl #(
  parameter int unsigned AW = 18,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic          rvalid,
  output logic [DW-1:0] rdata,
  // SRAM pins
  output logic [AW-1:0] sram_addr,
  output logic [DW-1:0] sram_dq_o,
  output logic          sram_dq_oe,
  input  logic [DW-1:0] sram_dq_i,
  output logic          sram_we_n,
  output logic          sram_oe_n,
  output logic          sram_ce_n,
  output logic          sram_ub_n,
  output logic          sram_lb_n
);

  logic          busy, we_r;
  logic [AW-1:0] addr_r;
  logic [DW-1:0] wdata_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      we_r    <= 1'b0;
      addr_r  <= '0;
      wdata_r <= '0;
      rvalid  <= 1'b0;
      rdata   <= '0;
    end else begin
      busy   <= req;
      if (req) begin
        we_r    <= we;
        addr_r  <= addr;
        wdata_r <= wdata;
      end
      rvalid <= busy && !we_r;
      if (busy && !we_r) rdata <= sram_dq_i;
    end
  end

  always_comb begin
    sram_addr  = addr_r;
    sram_dq_o  = wdata_r;
    sram_dq_oe = busy && we_r;
    sram_we_n  = !(busy && we_r);
    sram_oe_n  = !(busy && !we_r);
    sram_ce_n  = !busy;
    sram_ub_n  = !busy;
    sram_lb_n  = !busy;
  end

endmodule
