// touchpads: controller for an array of modular capacitive touch sensor
// blocks, as one IP block with a simple memory-mapped user interface.
//
// Sensor blocks (16 pads each, in a 4 x 4 square) snap together edge to
// edge in any arrangement and share one I2C bus, two sense rails and a
// reset line. This module finds the blocks, works out where each one sits
// and how it is turned, measures every pad, and lets user logic read a
// pad's reading by its (x, y) position in the assembled array.
//
// Sequencing FSM (on clk_100mhz):
//   RESET_PICS  hold the blocks' reset (active low) for MCLR_CYCLES
//   SCAN        i2c_commands SCAN_ADDRESSES: build the bus address table
//   MAP         xy_mapping owns the command port; builds the block map
//   POLL        polling owns the command port; fills the sensor state RAM
//   XY          make_xy_status_bram copies readings into the two user RAMs
//   IDLE        wait: mode high (held or pulsed) -> POLL; rescan -> SCAN
// After reset the sequence runs SCAN, MAP, POLL, XY once by itself. If no
// block answers the scan, the FSM goes straight back to IDLE.
//
// Clock domains: everything above runs on clk_100mhz; the user ports run on
// clk_user (at most 100 MHz, and faster than the I2C clock). Pad data
// crosses in two dual-clock RAMs addressed by {x, y}, one per user read
// port. mode and rescan_trig are synchronized into clk_100mhz and
// remembered until acted on. done_out is a one-user-clock pulse after each
// completed refresh (toggle synchronizer), busy_out is high while the
// controller scans and maps, and the coordinate bounds are re-timed by
// two flops per bit; they only change while busy_out is high.
//
// User read ports: present x/y_coordinate; sensor_data (and sensor_data2
// for the second port) holds the edge count of that pad two user clocks
// later, or 0 where there is no pad or the coordinate is outside the
// bounds. A smaller count means more capacitance, i.e. a touch.
// sensor_valid (sensor_valid2) comes with the data and is high when a pad
// is there, i.e. when the reading is nonzero.
//
// I2C pins are open drain: *_oe = 1 pulls the line low, *_i is the line.
//
// The sequence, the submodules and the two user ports follow the document.
// The reset pulse length, the synchronizers used for the control inputs
// (the document passes them through a dual-clock RAM too), and the gating
// of reads outside the bounds are this design's own.
module touchpads
  import tp_pkg::*;
#(
  parameter int unsigned N           = 4,
  parameter int unsigned I2C_SPEED   = 400000,
  parameter int unsigned XY_QUADRANT = 4,
  parameter int unsigned SENSE_TIME  = 75000,
  parameter int unsigned CLK_HZ      = 100000000,
  parameter int unsigned MCLR_CYCLES = 1024
) (
  input  logic           clk_100mhz,
  input  logic           clk_user,
  input  logic           reset,
  // user control (clk_user)
  input  logic           mode,
  input  logic           rescan_trig,
  output logic           done_out,
  output logic           busy_out,
  output logic [N+1:0]   x_upper_bound_out,
  output logic [N+1:0]   y_upper_bound_out,
  input  logic [N+1:0]   x_coordinate,
  input  logic [N+1:0]   y_coordinate,
  output logic [11:0]    sensor_data,
  input  logic [N+1:0]   x_coordinate2,
  input  logic [N+1:0]   y_coordinate2,
  output logic [11:0]    sensor_data2,
  output logic           sensor_valid,
  output logic           sensor_valid2,
  // sensor block bus
  input  logic           scl_i,
  output logic           scl_oe,
  input  logic           sda_i,
  output logic           sda_oe,
  output logic           fpga_neighbor_detect,
  output logic           sensor_blocks_reset_n,
  input  logic           sensor_1,
  input  logic           sensor_2,
  // status (clk_100mhz)
  output logic [4:0]     master_fsm_state,
  output logic [N-1:0]   polling_int_addr,
  output logic [N-1:0]   command_int_addr,
  output logic           map_error,
  output logic           bus_error
);

  typedef enum logic [4:0] {
    T_RESET_PICS, T_SCAN, T_SCAN_WAIT, T_MAP, T_MAP_WAIT, T_POLL, T_POLL_WAIT,
    T_XY, T_XY_WAIT, T_IDLE
  } tstate_e;
  tstate_e state;

  // ---------------------------------------------------------------- I2C
  logic         c_start, c_done, c_no_blocks;
  logic [4:0]   c_cmd;
  logic [N-1:0] c_addr, c_max;
  logic [7:0]   c_ret;

  // commands issued by the sequencer itself (the scan)
  logic         s_start;

  // mapping
  logic         m_start, m_done, m_i2c_start;
  logic [4:0]   m_cmd;
  logic [N-1:0] m_addr;
  logic         ct_we, ct_set;
  logic [N-1:0] ct_wx, ct_wy, m_max_x, m_max_y;
  logic [N+2:0] ct_wdata;

  // polling
  logic         p_start, p_done, p_i2c_start, p_we;
  logic [4:0]   p_cmd;
  logic [N-1:0] p_addr;
  logic [N+3:0] p_waddr;
  logic [11:0]  p_din;

  always_comb begin
    unique case (state)
      T_MAP_WAIT:  begin c_start = m_i2c_start; c_cmd = m_cmd; c_addr = m_addr; end
      T_POLL_WAIT: begin c_start = p_i2c_start; c_cmd = p_cmd; c_addr = p_addr; end
      default:     begin c_start = s_start; c_cmd = CMD_SCAN_ADDRESSES; c_addr = '0; end
    endcase
  end

  i2c_commands #(.N(N), .I2C_SPEED(I2C_SPEED), .CLK_HZ(CLK_HZ)) u_cmd (
    .clk(clk_100mhz), .reset(reset),
    .start(c_start), .command(c_cmd), .address_int(c_addr),
    .done(c_done), .return_data(c_ret), .bus_error(bus_error),
    .max_internal_address(c_max), .no_blocks(c_no_blocks),
    .scl_i(scl_i), .scl_oe(scl_oe), .sda_i(sda_i), .sda_oe(sda_oe)
  );

  xy_mapping #(.N(N)) u_map (
    .clk(clk_100mhz), .reset(reset), .start(m_start), .max_internal_address(c_max),
    .done(m_done), .map_error(map_error),
    .i2c_start(m_i2c_start), .i2c_command(m_cmd), .i2c_address(m_addr),
    .i2c_done(c_done), .i2c_return_data(c_ret),
    .fpga_neighbor_detect(fpga_neighbor_detect),
    .ct_we(ct_we), .ct_x(ct_wx), .ct_y(ct_wy), .ct_data(ct_wdata), .ct_set(ct_set),
    .max_x(m_max_x), .max_y(m_max_y)
  );

  polling #(.N(N), .SENSE_TIME(SENSE_TIME)) u_poll (
    .clock(clk_100mhz), .reset(reset), .start(p_start), .i2c_done(c_done),
    .max_internal_address(c_max), .sensor_in1(sensor_1), .sensor_in2(sensor_2),
    .done(p_done), .i2c_start(p_i2c_start), .i2c_command(p_cmd), .internal_address(p_addr),
    .bram_address(p_waddr), .bram_we(p_we), .bram_din(p_din)
  );

  // ------------------------------------------------ translation and RAMs
  logic [N+1:0]   xy_qx, xy_qy, bx, by;
  logic           q_valid;
  logic [N+3:0]   q_addr, s_raddr;
  logic [11:0]    s_dout;
  logic           x_start, x_done, x_we;
  logic [2*N+3:0] x_waddr;
  logic [11:0]    x_din;

  coordinate_translation #(.N(N), .XY_QUADRANT(XY_QUADRANT)) u_ct (
    .clk(clk_100mhz), .reset(reset), .set_output(ct_set), .write_enable(ct_we),
    .x_address(ct_wx), .y_address(ct_wy), .data_in(ct_wdata),
    .max_x_bound_in(m_max_x), .max_y_bound_in(m_max_y),
    .x_coordinate(xy_qx), .y_coordinate(xy_qy),
    .max_x_bound_out(bx), .max_y_bound_out(by), .valid(q_valid), .address(q_addr)
  );

  bram_sdp #(.LOGSIZE(N+4), .WIDTH(12)) u_state (
    .clk(clk_100mhz), .we(p_we), .waddr(p_waddr), .din(p_din), .raddr(s_raddr), .dout(s_dout)
  );

  make_xy_status_bram #(.N(N)) u_xy (
    .clk(clk_100mhz), .reset(reset), .start(x_start), .done(x_done), .busy(),
    .x_upper_bound(bx), .y_upper_bound(by),
    .ct_x(xy_qx), .ct_y(xy_qy), .ct_valid(q_valid), .ct_address(q_addr),
    .state_raddr(s_raddr), .state_dout(s_dout),
    .xy_we(x_we), .xy_addr(x_waddr), .xy_din(x_din)
  );

  // ------------------------------------------------ user clock domain
  logic [N+1:0] ux1, uy1, ux2, uy2;
  logic [N+1:0] bx_s1, by_s1;
  logic         ok1, ok2;
  logic [11:0]  d1, d2;

  bram_dualclock #(.LOGSIZE(2*N+4), .WIDTH(12)) u_user1 (
    .wclk(clk_100mhz), .we(x_we), .waddr(x_waddr), .din(x_din),
    .rclk(clk_user), .raddr({ux1, uy1}), .dout(d1)
  );
  bram_dualclock #(.LOGSIZE(2*N+4), .WIDTH(12)) u_user2 (
    .wclk(clk_100mhz), .we(x_we), .waddr(x_waddr), .din(x_din),
    .rclk(clk_user), .raddr({ux2, uy2}), .dout(d2)
  );

  always_ff @(posedge clk_user) begin
    if (reset) begin
      ux1 <= '0; uy1 <= '0; ux2 <= '0; uy2 <= '0;
      bx_s1 <= '0; by_s1 <= '0;
      x_upper_bound_out <= '0; y_upper_bound_out <= '0;
      ok1 <= 1'b0; ok2 <= 1'b0;
    end else begin
      ux1 <= x_coordinate;  uy1 <= y_coordinate;
      ux2 <= x_coordinate2; uy2 <= y_coordinate2;
      bx_s1 <= bx; by_s1 <= by;
      x_upper_bound_out <= bx_s1;
      y_upper_bound_out <= by_s1;
      ok1 <= (x_coordinate  <= x_upper_bound_out) && (y_coordinate  <= y_upper_bound_out);
      ok2 <= (x_coordinate2 <= x_upper_bound_out) && (y_coordinate2 <= y_upper_bound_out);
    end
  end

  assign sensor_data  = ok1 ? d1 : 12'd0;
  assign sensor_data2 = ok2 ? d2 : 12'd0;
  assign sensor_valid  = sensor_data  != 12'd0;
  assign sensor_valid2 = sensor_data2 != 12'd0;

  // control into the 100 MHz domain
  logic mode_s, rescan_s, rescan_prev, mode_prev, rescan_req, mode_req;
  synchronize #(.NSYNC(2)) u_sync_mode   (.clk(clk_100mhz), .reset(reset), .in(mode),        .out(mode_s));
  synchronize #(.NSYNC(2)) u_sync_rescan (.clk(clk_100mhz), .reset(reset), .in(rescan_trig), .out(rescan_s));

  // status into the user domain
  logic done_tgl, busy_int, done_tgl_u, done_tgl_u_prev;
  synchronize #(.NSYNC(2)) u_sync_done (.clk(clk_user), .reset(reset), .in(done_tgl), .out(done_tgl_u));
  synchronize #(.NSYNC(2)) u_sync_busy (.clk(clk_user), .reset(reset), .in(busy_int), .out(busy_out));

  always_ff @(posedge clk_user) begin
    if (reset) begin
      done_tgl_u_prev <= 1'b0;
      done_out        <= 1'b0;
    end else begin
      done_tgl_u_prev <= done_tgl_u;
      done_out        <= done_tgl_u ^ done_tgl_u_prev;
    end
  end

  // ------------------------------------------------ sequencing FSM
  logic [$clog2(MCLR_CYCLES+1)-1:0] mclr_cnt;

  always_ff @(posedge clk_100mhz) begin
    if (reset) begin
      state                 <= T_RESET_PICS;
      mclr_cnt              <= '0;
      sensor_blocks_reset_n <= 1'b0;
      s_start               <= 1'b0;
      m_start               <= 1'b0;
      p_start               <= 1'b0;
      x_start               <= 1'b0;
      done_tgl              <= 1'b0;
      busy_int              <= 1'b1;
      mode_prev             <= 1'b0;
      rescan_prev           <= 1'b0;
      mode_req              <= 1'b0;
      rescan_req            <= 1'b0;
    end else begin
      s_start     <= 1'b0;
      m_start     <= 1'b0;
      p_start     <= 1'b0;
      x_start     <= 1'b0;
      mode_prev   <= mode_s;
      rescan_prev <= rescan_s;
      if (mode_s && !mode_prev)     mode_req   <= 1'b1;
      if (rescan_s && !rescan_prev) rescan_req <= 1'b1;
      unique case (state)
        T_RESET_PICS: begin
          busy_int <= 1'b1;
          mclr_cnt <= mclr_cnt + 1'b1;
          if (mclr_cnt == ($bits(mclr_cnt))'(MCLR_CYCLES - 1)) begin
            sensor_blocks_reset_n <= 1'b1;
            state                 <= T_SCAN;
          end
        end
        T_SCAN: begin
          busy_int   <= 1'b1;
          rescan_req <= 1'b0;
          if (c_done) begin
            s_start <= 1'b1;
            state   <= T_SCAN_WAIT;
          end
        end
        T_SCAN_WAIT: if (c_done && !s_start) begin
          state <= c_no_blocks ? T_IDLE : T_MAP;
          if (c_no_blocks) busy_int <= 1'b0;
        end
        T_MAP: begin
          m_start <= 1'b1;
          state   <= T_MAP_WAIT;
        end
        T_MAP_WAIT: if (m_done) begin
          busy_int <= 1'b0;
          state    <= T_POLL;
        end
        T_POLL: begin
          mode_req <= 1'b0;
          p_start  <= 1'b1;
          state    <= T_POLL_WAIT;
        end
        T_POLL_WAIT: if (p_done) state <= T_XY;
        T_XY: begin
          x_start <= 1'b1;
          state   <= T_XY_WAIT;
        end
        T_XY_WAIT: if (x_done) begin
          done_tgl <= ~done_tgl;
          state    <= T_IDLE;
        end
        default: begin  // T_IDLE
          if (rescan_req) begin
            busy_int <= 1'b1;
            state    <= T_SCAN;
          end else if (mode_s || mode_req) begin
            state <= T_POLL;
          end
        end
      endcase
    end
  end

  assign master_fsm_state = state;
  assign polling_int_addr = p_addr;
  assign command_int_addr = c_addr;

  // A sequencer command is only issued while the command layer is idle.
  assert property (@(posedge clk_100mhz) disable iff (reset) s_start |-> $past(c_done));

endmodule
