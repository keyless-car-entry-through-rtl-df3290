// i2c_av_config: writes the TV decoder chip's set-up registers over I2C.
//
// After reset the block walks a table of N_REGS entries, each 24 bits
// {device address with write bit, register, value}, and sends each one as an
// I2C write: START, three bytes each followed by an acknowledge clock, STOP.
// A byte that is not acknowledged (SDA high in the ninth clock) makes the
// block send the same entry again. When the table is done, done stays high.
//
// SCL is driven push-pull; SDA is open drain: sda_oe = 1 pulls it low,
// sda_oe = 0 releases it and sda_i reads the line. Every SCL period takes
// 4 * QDIV clocks (QDIV clocks per quarter); the default gives 25 kHz from
// a 27 MHz clock.
//
// The document only names this block and says I2C talks to the decoder.
// The framing is standard I2C; the register list (device 0x40 and three
// example registers of the ADV7181) is an assumed default to be replaced
// with the decoder's real set-up table.
module i2c_av_config #(
  parameter int unsigned QDIV   = 270,
  parameter int unsigned N_REGS = 3,
  parameter logic [N_REGS-1:0][23:0] REGS = {24'h40_17_41, 24'h40_15_00, 24'h40_00_00}
) (
  input  logic clk,
  input  logic rst_n,
  output logic scl,
  output logic sda_oe,
  input  logic sda_i,
  output logic done,
  output logic nack_seen   // sticky: some byte was not acknowledged
);

  typedef enum logic [1:0] {P_START, P_BITS, P_STOP, P_DONE} phase_t;

  phase_t                 phase;
  logic [$clog2(QDIV)-1:0] qcnt;
  logic [1:0]             quarter;
  logic [1:0]             byte_i;
  logic [3:0]             bit_i;     // 0..7 data, 8 acknowledge
  logic [$clog2(N_REGS+1)-1:0] entry;
  logic                   ack_err;

  wire        tick  = (qcnt == '0);
  wire [23:0] word  = REGS[entry[$clog2(N_REGS)-1:0] ];
  wire [4:0]  bpos  = 5'(23 - 8 * int'(byte_i) - int'(bit_i));
  wire        dbit  = word[bpos];
  wire        is_ack = (bit_i == 4'd8);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qcnt      <= '0;
      quarter   <= '0;
      phase     <= P_START;
      byte_i    <= '0;
      bit_i     <= '0;
      entry     <= '0;
      ack_err   <= 1'b0;
      nack_seen <= 1'b0;
      scl       <= 1'b1;
      sda_oe    <= 1'b0;
    end else if (phase != P_DONE) begin
      qcnt <= (qcnt == $bits(qcnt)'(QDIV - 1)) ? '0 : qcnt + 1'b1;
      if (tick) begin
        quarter <= quarter + 2'd1;
        unique case (phase)
          P_START: begin
            // SDA falls while SCL is high, then SCL goes low
            unique case (quarter)
              2'd0: begin scl <= 1'b1; sda_oe <= 1'b0; end
              2'd1: begin scl <= 1'b1; sda_oe <= 1'b1; end
              2'd2: begin scl <= 1'b0; sda_oe <= 1'b1; end
              2'd3: begin
                phase   <= P_BITS;
                byte_i  <= '0;
                bit_i   <= '0;
                ack_err <= 1'b0;
              end
            endcase
          end
          P_BITS: begin
            unique case (quarter)
              2'd0: begin scl <= 1'b0; sda_oe <= is_ack ? 1'b0 : !dbit; end
              2'd1: scl <= 1'b1;
              2'd2: if (is_ack && sda_i) ack_err <= 1'b1;
              2'd3: begin
                scl <= 1'b0;
                if (!is_ack) begin
                  bit_i <= bit_i + 4'd1;
                end else begin
                  bit_i <= '0;
                  if (byte_i == 2'd2) phase <= P_STOP;
                  else                byte_i <= byte_i + 2'd1;
                end
              end
            endcase
          end
          P_STOP: begin
            // SDA rises while SCL is high
            unique case (quarter)
              2'd0: begin scl <= 1'b0; sda_oe <= 1'b1; end
              2'd1: begin scl <= 1'b1; sda_oe <= 1'b1; end
              2'd2: begin scl <= 1'b1; sda_oe <= 1'b0; end
              2'd3: begin
                if (ack_err) begin
                  nack_seen <= 1'b1;
                  phase     <= P_START;          // send the same entry again
                end else if (32'(entry) == N_REGS - 1) begin
                  phase <= P_DONE;
                end else begin
                  entry <= entry + 1'b1;
                  phase <= P_START;
                end
              end
            endcase
          end
          default: ;
        endcase
      end
    end
  end

  assign done = (phase == P_DONE);

endmodule
