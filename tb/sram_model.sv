// sram_model: behavioural model of the board's 256K x 16 asynchronous SRAM
// (not synthesizable; testbench use only).
//
// Reads are combinational: with CE_N and OE_N low the addressed word
// appears on dq_i at once. A write (CE_N and WE_N low) is taken at the
// rising clock edge that ends the controller's one-clock write cycle; the
// real part latches on the rising edge of WE_N, which falls on the same
// edge here. Byte lanes are not modelled separately (both are always on).
module sram_model #(
  parameter int unsigned AW = 18
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [15:0]   dq_o,
  input  logic          dq_oe,
  output logic [15:0]   dq_i,
  input  logic          we_n,
  input  logic          oe_n,
  input  logic          ce_n
);

  logic [15:0] mem [2**AW];

  initial for (int i = 0; i < 2**AW; i++) mem[i] = 16'h0000;

  always @(posedge clk) begin
    if (!ce_n && !we_n && dq_oe) mem[addr] <= dq_o;
  end

  assign dq_i = (!ce_n && !oe_n) ? mem[addr] : 16'h0000;

endmodule
