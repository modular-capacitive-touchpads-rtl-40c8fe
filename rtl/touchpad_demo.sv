// touchpad_demo: complete FPGA design for the modular touchpads: the
// touchpads controller plus two user applications on the user clock.
//
// * tp_display shows the assembled pad array on a 1024 x 768 VGA screen
//   (read port 1), one square per pad, green when touched.
// * num_pad treats ten pads as a numeric keypad and sends the key states
//   over a serial line to a USB keyboard microcontroller (read port 2).
// * simple_calibration sets the touch threshold when the calibrate button
//   is pressed; while it runs it borrows read port 2 from num_pad. Five
//   switches trim the result: threshold = calibrated value minus
//   threshold_trim[4:1] when threshold_trim[0] is 1, plus it when 0.
// * Three debounced buttons: mode (held: sensors are polled continuously;
//   pressed: one poll), rescan (find and map the blocks again) and
//   calibrate.
// * display_8hex shows {0, threshold, y bound, x bound} in hexadecimal
//   on the board's eight-digit seven-segment display (seg, strobe, both
//   active low). The other status outputs (controller state, the blocks
//   being polled and addressed, error flags, keys) are meant for LEDs.
//
// clk_100mhz drives the controller; clk_user is the 65 MHz VGA pixel
// clock, which also runs the applications. Both clocks come from the
// board's clock generator. I2C pins are open drain (*_oe = 1 pulls low).
//
// The split into controller and user applications and the choice of
// applications follow the document; the button functions and the sharing
// of read port 2 are this design's own.
module touchpad_demo #(
  parameter int unsigned N              = 4,
  parameter int unsigned DEBOUNCE_DELAY = 650000,
  parameter int unsigned UART_DIVISOR   = 564
) (
  input  logic        clk_100mhz,
  input  logic        clk_user,
  input  logic        reset,
  input  logic        btn_mode,
  input  logic        btn_rescan,
  input  logic        btn_calibrate,
  input  logic [2:0]  pad_size_log2,
  input  logic [4:0]  threshold_trim,
  // sensor block bus
  input  logic        scl_i,
  output logic        scl_oe,
  input  logic        sda_i,
  output logic        sda_oe,
  output logic        fpga_neighbor_detect,
  output logic        sensor_blocks_reset_n,
  input  logic        sensor_1,
  input  logic        sensor_2,
  // VGA
  output logic [3:0]  vga_r,
  output logic [3:0]  vga_g,
  output logic [3:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs,
  // keypad serial link
  output logic        uart_tx,
  // status
  output logic [11:0] threshold,
  output logic [9:0]  keys,
  output logic        scan_done,
  output logic        busy,
  output logic        map_error,
  output logic        bus_error,
  output logic [4:0]  controller_state,
  output logic [N-1:0] polling_int_addr,
  output logic [N-1:0] command_int_addr,
  output logic        key_frame_sent,
  output logic        calibrated,
  // seven-segment display
  output logic [6:0]  seg,
  output logic [7:0]  strobe
);

  // debounced controls (user clock)
  logic mode_c, rescan_c, calib_c, rescan_prev, calib_prev;
  debounce #(.DELAY(DEBOUNCE_DELAY)) u_db_mode   (.clk(clk_user), .reset(reset), .noisy(btn_mode),      .clean(mode_c));
  debounce #(.DELAY(DEBOUNCE_DELAY)) u_db_rescan (.clk(clk_user), .reset(reset), .noisy(btn_rescan),    .clean(rescan_c));
  debounce #(.DELAY(DEBOUNCE_DELAY)) u_db_calib  (.clk(clk_user), .reset(reset), .noisy(btn_calibrate), .clean(calib_c));

  always_ff @(posedge clk_user) begin
    if (reset) begin
      rescan_prev <= 1'b0;
      calib_prev  <= 1'b0;
    end else begin
      rescan_prev <= rescan_c;
      calib_prev  <= calib_c;
    end
  end

  logic [N+1:0] xb, yb, x1, y1, x2, y2, xc, yc, xn, yn;
  logic [11:0]  d1, d2;
  logic         cal_busy;
  logic [11:0]  cal_threshold;

  // switch trim of the calibrated threshold: bit 0 selects down/up,
  // bits 4:1 give the amount
  assign threshold = threshold_trim[0] ? cal_threshold - 12'(threshold_trim[4:1])
                                       : cal_threshold + 12'(threshold_trim[4:1]);

  touchpads #(.N(N)) u_tp (
    .clk_100mhz(clk_100mhz), .clk_user(clk_user), .reset(reset),
    .mode(mode_c), .rescan_trig(rescan_c && !rescan_prev),
    .done_out(scan_done), .busy_out(busy),
    .x_upper_bound_out(xb), .y_upper_bound_out(yb),
    .x_coordinate(x1), .y_coordinate(y1), .sensor_data(d1),
    .x_coordinate2(x2), .y_coordinate2(y2), .sensor_data2(d2),
    .sensor_valid(), .sensor_valid2(),
    .scl_i(scl_i), .scl_oe(scl_oe), .sda_i(sda_i), .sda_oe(sda_oe),
    .fpga_neighbor_detect(fpga_neighbor_detect), .sensor_blocks_reset_n(sensor_blocks_reset_n),
    .sensor_1(sensor_1), .sensor_2(sensor_2),
    .master_fsm_state(controller_state), .polling_int_addr(polling_int_addr), .command_int_addr(command_int_addr),
    .map_error(map_error), .bus_error(bus_error)
  );

  // VGA
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, blank;
  logic [11:0] rgb;

  xvga u_xvga (.vga_clock(clk_user), .reset(reset), .hcount(hcount), .vcount(vcount),
               .hsync(hsync), .vsync(vsync), .blank(blank));

  tp_display #(.N(N)) u_disp (
    .clk(clk_user), .reset(reset), .hcount(hcount), .vcount(vcount),
    .hsync(hsync), .vsync(vsync), .blank(blank),
    .pad_size_log2(pad_size_log2), .threshold(threshold),
    .x_upper_bound(xb), .y_upper_bound(yb),
    .x_coordinate(x1), .y_coordinate(y1), .pad_data(d1),
    .rgb(rgb), .hs(vga_hs), .vs(vga_vs)
  );
  assign {vga_r, vga_g, vga_b} = rgb;

  // calibration and keypad share read port 2
  simple_calibration #(.N(N)) u_cal (
    .clk(clk_user), .reset(reset), .start(calib_c && !calib_prev && !busy),
    .done(calibrated), .busy(cal_busy),
    .x_upper_bound(xb), .y_upper_bound(yb),
    .x_coordinate(xc), .y_coordinate(yc), .pad_data(d2), .threshold(cal_threshold)
  );

  num_pad #(.N(N), .DIVISOR(UART_DIVISOR)) u_pad (
    .clk(clk_user), .reset(reset), .pad_data(cal_busy ? 12'd0 : d2), .threshold(threshold),
    .x_coordinate(xn), .y_coordinate(yn), .xmit_data(uart_tx), .keys(keys), .frame_sent(key_frame_sent)
  );

  display_8hex u_hex (.clk(clk_user), .reset(reset),
                      .data({4'h0, threshold, 8'(yb), 8'(xb)}), .seg(seg), .strobe(strobe));

  assign x2 = cal_busy ? xc : xn;
  assign y2 = cal_busy ? yc : yn;

endmodule
