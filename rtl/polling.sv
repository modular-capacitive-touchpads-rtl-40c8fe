// polling: reads every pad of every sensor block into the sensor state RAM.
//
// For each block from internal address 0 to max_internal_address:
//   1. SET_SENSE_RAILS_ON  - the block drives its two oscillators onto the
//                            two shared sense rails;
//   2. for select 0..7: SET_MUX_OUTPUTS(select), then start both cap_sense
//      counters together and wait for both to finish, then write rail 1's
//      count to {block, 0, select} and rail 2's to {block, 1, select};
//   3. SET_SENSE_RAILS_OFF.
// When the last block is done, done pulses for one clock and the module
// waits for the next rising edge of start.
//
// I2C handshake: i2c_start is a one-clock pulse with i2c_command and
// internal_address; the module then waits for i2c_done to fall and rise
// again. One block takes 18 commands plus 8 windows of SENSE_TIME clocks.
//
// The sequence and the RAM address format follow the document; the
// handshake details are this design's own.
module polling
  import tp_pkg::*;
#(
  parameter int unsigned N           = 4,
  parameter int unsigned COMMAND_LEN = 5,
  parameter int unsigned SENSE_TIME  = 75000
) (
  input  logic                   clock,
  input  logic                   reset,
  input  logic                   start,
  input  logic                   i2c_done,
  input  logic [N-1:0]           max_internal_address,
  input  logic                   sensor_in1,
  input  logic                   sensor_in2,
  output logic                   done,
  output logic                   i2c_start,
  output logic [COMMAND_LEN-1:0] i2c_command,
  output logic [N-1:0]           internal_address,
  output logic [N+3:0]           bram_address,
  output logic                   bram_we,
  output logic [SENSE_W-1:0]     bram_din
);

  typedef enum logic [3:0] {
    P_IDLE, P_RAILS_ON, P_SET_MUX, P_CMD_BUSY, P_CMD_WAIT, P_SENSE, P_SENSE_WAIT,
    P_STORE2, P_NEXT, P_RAILS_OFF
  } pstate_e;
  pstate_e state, after_cmd;

  logic       prev_start;
  logic [2:0] sel;
  logic       s_start;
  logic       d1, d2, got1, got2;
  logic [11:0] c1, c2;

  cap_sense #(.SENSE_TIME(SENSE_TIME)) u_rail1 (
    .clock(clock), .reset(reset), .sensor_in(sensor_in1), .start(s_start), .done(d1), .data(c1));
  cap_sense #(.SENSE_TIME(SENSE_TIME)) u_rail2 (
    .clock(clock), .reset(reset), .sensor_in(sensor_in2), .start(s_start), .done(d2), .data(c2));

  always_ff @(posedge clock) begin
    if (reset) begin
      state            <= P_IDLE;
      after_cmd        <= P_IDLE;
      prev_start       <= 1'b0;
      sel              <= '0;
      s_start          <= 1'b0;
      got1             <= 1'b0;
      got2             <= 1'b0;
      done             <= 1'b0;
      i2c_start        <= 1'b0;
      i2c_command      <= '0;
      internal_address <= '0;
      bram_address     <= '0;
      bram_we          <= 1'b0;
      bram_din         <= '0;
    end else begin
      prev_start <= start;
      done       <= 1'b0;
      i2c_start  <= 1'b0;
      bram_we    <= 1'b0;
      s_start    <= 1'b0;
      unique case (state)
        P_IDLE: if (start && !prev_start) begin
          internal_address <= '0;
          state            <= P_RAILS_ON;
        end
        P_RAILS_ON: begin
          i2c_start   <= 1'b1;
          i2c_command <= CMD_SET_SENSE_RAILS_ON;
          sel         <= '0;
          after_cmd   <= P_SET_MUX;
          state       <= P_CMD_BUSY;
        end
        P_SET_MUX: begin
          i2c_start   <= 1'b1;
          i2c_command <= cmd_set_mux(sel);
          after_cmd   <= P_SENSE;
          state       <= P_CMD_BUSY;
        end
        // wait for the command layer to take the command, then to finish it
        P_CMD_BUSY: if (!i2c_done && !i2c_start) state <= P_CMD_WAIT;
        P_CMD_WAIT: if (i2c_done) state <= after_cmd;
        P_SENSE: begin
          s_start <= 1'b1;
          got1    <= 1'b0;
          got2    <= 1'b0;
          state   <= P_SENSE_WAIT;
        end
        P_SENSE_WAIT: begin
          if (d1) got1 <= 1'b1;
          if (d2) got2 <= 1'b1;
          if ((got1 || d1) && (got2 || d2)) begin
            bram_we      <= 1'b1;
            bram_address <= {internal_address, 1'b0, sel};
            bram_din     <= c1;
            state        <= P_STORE2;
          end
        end
        P_STORE2: begin
          bram_we      <= 1'b1;
          bram_address <= {internal_address, 1'b1, sel};
          bram_din     <= c2;
          state        <= P_NEXT;
        end
        P_NEXT: begin
          sel <= sel + 1'b1;
          if (sel == 3'd7) state <= P_RAILS_OFF;
          else             state <= P_SET_MUX;
        end
        default: begin  // P_RAILS_OFF
          i2c_start   <= 1'b1;
          i2c_command <= CMD_SET_SENSE_RAILS_OFF;
          if (internal_address == max_internal_address) begin
            after_cmd <= P_IDLE;
          end else begin
            after_cmd <= P_RAILS_ON;
          end
          state <= P_CMD_BUSY;
        end
      endcase
      // address advances / done pulse once the rails-off command finishes
      if (state == P_CMD_WAIT && i2c_done && i2c_command == CMD_SET_SENSE_RAILS_OFF) begin
        if (after_cmd == P_IDLE) done <= 1'b1;
        else internal_address <= internal_address + 1'b1;
      end
    end
  end

endmodule
