// i2c_master: minimal single-master I2C engine for one-byte transactions.
//
// Each transaction is START, 7-bit address with R/W bit, one data byte
// (written by the master, or read by it and answered with NACK), STOP.
// That is all the touchpad command layer needs: every message to a sensor
// block is a single byte, and a read returns a single byte.
//
// Timing: every bit takes four quarter periods of PRESCALE clocks, so the
// bus runs at CLK_HZ / (4 * PRESCALE). Quarter 0 drives SDA with SCL low,
// quarters 1 and 2 hold SCL high (SDA is sampled at the end of quarter 2),
// quarter 3 pulls SCL low again. A complete transaction takes
// (2 + 18 * 4 + 4) * PRESCALE + 2 clocks from cmd_valid to done.
//
// Interface: pulse cmd_valid while cmd_ready is high with cmd_address,
// cmd_read and wdata. done pulses for one clock at the end; missed_ack is
// then valid (address or written byte not acknowledged) and rdata holds
// the byte read. The pins are open drain: *_oe = 1 pulls the line low,
// *_i is the resolved line. scl_i is part of the pin pair but is not
// read, because the engine does not support clock stretching.
//
// The document builds on a third-party I2C master; this replacement is
// this design's own and supports neither clock stretching nor arbitration.
module i2c_master #(
  parameter int unsigned PRESCALE = 63
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       cmd_valid,
  input  logic       cmd_read,
  input  logic [6:0] cmd_address,
  input  logic [7:0] wdata,
  output logic       cmd_ready,
  output logic [7:0] rdata,
  output logic       done,
  output logic       missed_ack,
  input  logic       scl_i,
  output logic       scl_oe,
  input  logic       sda_i,
  output logic       sda_oe
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_BITS, S_STOP} state_e;
  state_e state;

  logic [$clog2(PRESCALE+1)-1:0] pre_cnt;
  logic tick;
  logic [1:0] quarter;
  logic [3:0] bit_idx;       // 0..8 within a byte, bit 8 is the ack slot
  logic       byte_idx;      // 0 = address byte, 1 = data byte
  logic [8:0] tx;            // bits to put on SDA, MSB first (1 = release)
  logic [7:0] rx;
  logic       rd;
  logic       scl_lvl, sda_lvl;

  assign tick      = (pre_cnt == PRESCALE[$bits(pre_cnt)-1:0] - 1'b1);
  assign cmd_ready = (state == S_IDLE);
  assign scl_oe    = ~scl_lvl;
  assign sda_oe    = ~sda_lvl;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      pre_cnt    <= '0;
      quarter    <= '0;
      bit_idx    <= '0;
      byte_idx   <= 1'b0;
      tx         <= '1;
      rx         <= '0;
      rd         <= 1'b0;
      rdata      <= '0;
      done       <= 1'b0;
      missed_ack <= 1'b0;
      scl_lvl    <= 1'b1;
      sda_lvl    <= 1'b1;
    end else begin
      done <= 1'b0;
      if (state == S_IDLE) begin
        pre_cnt <= '0;
        quarter <= '0;
        scl_lvl <= 1'b1;
        sda_lvl <= 1'b1;
        if (cmd_valid) begin
          state      <= S_START;
          rd         <= cmd_read;
          tx         <= {cmd_address, cmd_read, 1'b1};
          rx         <= '0;
          bit_idx    <= '0;
          byte_idx   <= 1'b0;
          missed_ack <= 1'b0;
        end
      end else begin
        pre_cnt <= tick ? '0 : pre_cnt + 1'b1;
        if (tick) begin
          quarter <= quarter + 1'b1;
          unique case (state)
            // SDA falls while SCL is high, then SCL falls.
            S_START: begin
              if (quarter == 2'd0) sda_lvl <= 1'b0;
              else begin
                scl_lvl <= 1'b0;
                quarter <= '0;
                state   <= S_BITS;
              end
            end
            S_BITS: begin
              unique case (quarter)
                2'd0: begin scl_lvl <= 1'b0; sda_lvl <= tx[8]; end
                2'd1: scl_lvl <= 1'b1;
                2'd2: begin
                  if (bit_idx < 4'd8) rx <= {rx[6:0], sda_i};
                  else if (!(byte_idx && rd) && sda_i) missed_ack <= 1'b1;
                end
                default: begin
                  scl_lvl <= 1'b0;
                  tx      <= {tx[7:0], 1'b1};
                  if (bit_idx == 4'd8) begin
                    bit_idx <= '0;
                    if (byte_idx || missed_ack) begin
                      state <= S_STOP;
                      if (byte_idx && rd) rdata <= rx;
                    end else begin
                      byte_idx <= 1'b1;
                      // write: data byte then release for ack;
                      // read: release for 8 bits then NACK (release).
                      tx <= rd ? 9'h1FF : {wdata, 1'b1};
                    end
                  end else begin
                    bit_idx <= bit_idx + 1'b1;
                  end
                end
              endcase
            end
            // SDA low with SCL low, SCL rises, SDA rises.
            default: begin
              unique case (quarter)
                2'd0: sda_lvl <= 1'b0;
                2'd1: scl_lvl <= 1'b1;
                2'd2: sda_lvl <= 1'b1;
                default: begin
                  state <= S_IDLE;
                  done  <= 1'b1;
                end
              endcase
            end
          endcase
        end
      end
    end
  end

endmodule
