// i2c_commands: command layer between the touchpad controller and the I2C
// bus of sensor blocks.
//
// Other modules address sensor blocks by a dense N-bit internal address.
// SCAN_ADDRESSES probes bus addresses 1..127 with a one-byte write of
// "all tristates off"; every address that acknowledges is entered, in
// order, into a 2^N-entry table, so internal address k maps to the k-th
// block found. max_internal_address is then the last internal address used
// and no_blocks says whether anything answered. All other commands look up
// the bus address of address_int and send one byte:
//   NEIGHBOR_DETECT_HIGH/LOW  -> 0110_0000 / 0100_0000
//   SET_SENSE_RAILS_ON/OFF    -> 0000_0011 / 0000_0000
//   SET_MUX_OUTPUTS (11sss)   -> {11, sss, sss} (both multiplexers alike)
//   SENSE_NEIGHBORS           -> one-byte read; the block answers
//                                {ND_in[3:0], 0000} and return_data is
//                                {0000, left, top, right, bottom}.
//
// Handshake: done is high while idle. Pulse start for one clock with
// command and address_int; done falls on the next clock and rises again
// when the command is finished, with return_data and bus_error valid.
// bus_error reports a missed acknowledge, or a neighbor read whose low
// nibble was not zero. A scan takes 127 one-byte writes.
//
// Command codes, byte values and the scan follow the document. The I2C
// engine, the error handling and the done handshake details are this
// design's own.
module i2c_commands
  import tp_pkg::*;
#(
  parameter int unsigned N           = 4,
  parameter int unsigned COMMAND_LEN = 5,
  parameter int unsigned I2C_SPEED   = 400000,
  parameter int unsigned CLK_HZ      = 100000000
) (
  input  logic                   clk,
  input  logic                   reset,
  input  logic                   start,
  input  logic [COMMAND_LEN-1:0] command,
  input  logic [N-1:0]           address_int,
  output logic                   done,
  output logic [7:0]             return_data,
  output logic                   bus_error,
  output logic [N-1:0]           max_internal_address,
  output logic                   no_blocks,
  input  logic                   scl_i,
  output logic                   scl_oe,
  input  logic                   sda_i,
  output logic                   sda_oe
);

  localparam int unsigned PRESCALE   = CLK_HZ / (4 * I2C_SPEED);
  localparam int unsigned DEPTH      = 2 ** N;
  localparam logic [6:0]  MAX_BUS    = 7'd127;

  // internal -> bus address table
  logic [6:0] addr_table [DEPTH];

  typedef enum logic [2:0] {C_IDLE, C_SCAN_GO, C_SCAN_WAIT, C_CMD_GO, C_CMD_WAIT} cstate_e;
  cstate_e state;

  logic       m_valid, m_read, m_ready, m_done, m_nack;
  logic [6:0] m_addr;
  logic [7:0] m_wdata, m_rdata;
  logic [N:0] found;              // number of blocks entered so far
  logic [COMMAND_LEN-1:0] cur_cmd;

  i2c_master #(.PRESCALE(PRESCALE)) u_master (
    .clk(clk), .rst(reset),
    .cmd_valid(m_valid), .cmd_read(m_read), .cmd_address(m_addr), .wdata(m_wdata),
    .cmd_ready(m_ready), .rdata(m_rdata), .done(m_done), .missed_ack(m_nack),
    .scl_i(scl_i), .scl_oe(scl_oe), .sda_i(sda_i), .sda_oe(sda_oe)
  );

  function automatic logic [7:0] cmd_byte(input logic [COMMAND_LEN-1:0] c);
    if (c[4:3] == CMD_MUX_PREFIX) return {PIC_MUX_PREFIX, c[2:0], c[2:0]};
    case (c)
      CMD_NEIGHBOR_DETECT_HIGH: return PIC_ND_ON;
      CMD_NEIGHBOR_DETECT_LOW:  return PIC_ND_OFF;
      CMD_SET_SENSE_RAILS_ON:   return PIC_RAILS_ON;
      default:                  return PIC_RAILS_OFF;
    endcase
  endfunction

  function automatic logic known_cmd(input logic [COMMAND_LEN-1:0] c);
    return (c[4:3] == CMD_MUX_PREFIX) || c == CMD_NEIGHBOR_DETECT_HIGH ||
           c == CMD_NEIGHBOR_DETECT_LOW || c == CMD_SENSE_NEIGHBORS ||
           c == CMD_SET_SENSE_RAILS_ON || c == CMD_SET_SENSE_RAILS_OFF;
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      state                <= C_IDLE;
      done                 <= 1'b1;
      return_data          <= '0;
      bus_error            <= 1'b0;
      max_internal_address <= '0;
      no_blocks            <= 1'b1;
      m_valid              <= 1'b0;
      m_read               <= 1'b0;
      m_addr               <= '0;
      m_wdata              <= '0;
      found                <= '0;
      cur_cmd              <= '0;
      for (int i = 0; i < DEPTH; i++) addr_table[i] <= '0;
    end else begin
      m_valid <= 1'b0;
      unique case (state)
        C_IDLE: begin
          if (start && command == CMD_SCAN_ADDRESSES) begin
            done      <= 1'b0;
            bus_error <= 1'b0;
            found     <= '0;
            m_addr    <= 7'd1;          // skip the general call address
            state     <= C_SCAN_GO;
          end else if (start && known_cmd(command)) begin
            done      <= 1'b0;
            bus_error <= 1'b0;
            cur_cmd   <= command;
            m_addr    <= addr_table[address_int];
            state     <= C_CMD_GO;
          end
        end
        C_SCAN_GO: begin
          if (m_ready) begin
            m_valid <= 1'b1;
            m_read  <= 1'b0;
            m_wdata <= PIC_RAILS_OFF;
            state   <= C_SCAN_WAIT;
          end
        end
        C_SCAN_WAIT: begin
          if (m_done) begin
            logic [N:0] f;
            f = found;
            if (!m_nack) begin
              addr_table[found[N-1:0]] <= m_addr;
              f = found + 1'b1;
            end
            found <= f;
            if (m_addr == MAX_BUS || f == (N+1)'(DEPTH)) begin
              no_blocks            <= (f == '0);
              max_internal_address <= (f == '0) ? '0 : N'(f - 1'b1);
              done                 <= 1'b1;
              state                <= C_IDLE;
            end else begin
              m_addr <= m_addr + 1'b1;
              state  <= C_SCAN_GO;
            end
          end
        end
        C_CMD_GO: begin
          if (m_ready) begin
            m_valid <= 1'b1;
            m_read  <= (cur_cmd == CMD_SENSE_NEIGHBORS);
            m_wdata <= cmd_byte(cur_cmd);
            state   <= C_CMD_WAIT;
          end
        end
        default: begin  // C_CMD_WAIT
          if (m_done) begin
            if (m_nack) bus_error <= 1'b1;
            if (cur_cmd == CMD_SENSE_NEIGHBORS) begin
              if (m_rdata[3:0] != 4'h0) begin
                bus_error   <= 1'b1;
                return_data <= '0;
              end else begin
                return_data <= {4'b0000, m_rdata[7:4]};
              end
              if (m_nack) return_data <= '0;
            end
            done  <= 1'b1;
            state <= C_IDLE;
          end
        end
      endcase
    end
  end

endmodule
