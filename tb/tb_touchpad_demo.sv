// tb_touchpad_demo: full-size test of the complete design at its default
// parameters: 100 MHz controller clock, 65 MHz user clock, 400 kHz I2C,
// 0.75 ms measurement windows and 10 ms button debouncing.
//
// Two sensor block models share the bus: block A at bus address 0x2A sits
// under the FPGA connector, block B at 0x51 lies to its right, turned a
// quarter turn clockwise. The array is therefore 8 x 4 pads. An untouched
// pad oscillates at 100 kHz (75 edges per window), a touched one at 80 kHz
// (60 edges).
//
// Sequence and checks:
//   1. after reset the design scans, maps and polls by itself; the first
//      refresh must end without bus or map errors;
//   2. the calibrate button sets the threshold to the lowest untouched
//      reading (74..76 edges), the trim switches move it down and up, and the seven-segment display shows the
//      bounds (7 and 3) and the threshold's low digit;
//   3. keys 5 and 0 (pads (1,1) and (1,3) of block A) are touched and the
//      mode button requests one poll; num_pad must then report exactly
//      those keys, and the two serial bytes decoded from the UART line
//      (8N1, 564 user clocks per bit) must carry them; that poll must
//      take under 10 ms per block;
//   4. one full VGA frame is then counted: 2 green squares and 30 grey
//      squares of 31 x 31 lit pixels (32-pixel squares with a grid line),
//      and the frame must have 806 lines.
module tb_touchpad_demo;
  logic clk = 0, uclk = 0, reset = 1;
  always #5 clk = ~clk;
  always #7.7 uclk = ~uclk;

  logic btn_mode = 0, btn_rescan = 0, btn_cal = 0;
  logic [4:0] trim = '0;
  logic scl_oe, sda_oe, fpga_nd, mclr_n, s1, s2, scl, sda;
  logic [3:0] vr, vg, vb;
  logic hs, vs, tx, scan_done, busy, map_error, bus_error, frame_sent, calibrated;
  logic [11:0] threshold;
  logic [9:0] keys;
  logic [4:0] state;
  logic [6:0] seg;
  logic [7:0] strobe;

  touchpad_demo dut (
    .clk_100mhz(clk), .clk_user(uclk), .reset, .btn_mode, .btn_rescan, .btn_calibrate(btn_cal),
    .pad_size_log2(3'd5), .threshold_trim(trim), .scl_i(scl), .scl_oe, .sda_i(sda), .sda_oe,
    .fpga_neighbor_detect(fpga_nd), .sensor_blocks_reset_n(mclr_n), .sensor_1(s1), .sensor_2(s2),
    .vga_r(vr), .vga_g(vg), .vga_b(vb), .vga_hs(hs), .vga_vs(vs), .uart_tx(tx),
    .threshold, .keys, .scan_done, .busy, .map_error, .bus_error,
    .controller_state(state), .polling_int_addr(), .command_int_addr(), .key_frame_sent(frame_sent), .calibrated,
    .seg, .strobe);

  logic [1:0] pull, nd_out, r1, r2;
  logic [3:0] nd_a, nd_b;
  logic [15:0] touch_a = '0, touch_b = '0;
  logic [2:0] m1a, m2a, m1b, m2b;
  logic e1a, e2a, e1b, e2b;
  int wsa, rsa, wsb, rsb;
  assign scl = ~scl_oe;
  assign sda = ~(sda_oe | (|pull));
  assign s1 = |r1;
  assign s2 = |r2;
  // Edge e of a block turned r quarter turns faces world direction
  // (e + r) mod 4 (0 up, 1 right, 2 down, 3 left). A (r = 0): edge 0 faces
  // the FPGA, edge 1 faces B. B (r = 1): edge 2 faces left, towards A.
  assign nd_a = {1'b0, 1'b0, nd_out[1], fpga_nd};
  assign nd_b = {1'b0, nd_out[0], 1'b0, 1'b0};

  sensor_block_model #(.I2C_ADDR(7'h2A)) blk_a (
    .scl, .sda, .sda_pull(pull[0]), .mclr_n, .nd_in(nd_a), .nd_out(nd_out[0]), .touched(touch_a),
    .rail1(r1[0]), .rail2(r2[0]), .mux1(m1a), .mux2(m2a), .en1(e1a), .en2(e2a),
    .writes_seen(wsa), .reads_seen(rsa));
  sensor_block_model #(.I2C_ADDR(7'h51)) blk_b (
    .scl, .sda, .sda_pull(pull[1]), .mclr_n, .nd_in(nd_b), .nd_out(nd_out[1]), .touched(touch_b),
    .rail1(r1[1]), .rail2(r2[1]), .mux1(m1b), .mux2(m2b), .en1(e1b), .en2(e2b),
    .writes_seen(wsb), .reads_seen(rsb));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // seven-segment font, segments lit as letters a..g
  function automatic logic [6:0] hex_seg(input logic [3:0] h);
    string s;
    logic [6:0] r;
    case (h)
      0: s = "abcdef";  1: s = "bc";     2: s = "abdeg";  3: s = "abcdg";
      4: s = "bcfg";    5: s = "acdfg";  6: s = "acdefg"; 7: s = "abc";
      8: s = "abcdefg"; 9: s = "abcfg";  10: s = "abcefg"; 11: s = "cdefg";
      12: s = "adef";   13: s = "bcdeg"; 14: s = "adefg"; default: s = "aefg";
    endcase
    r = '0;
    for (int i = 0; i < s.len(); i++) r[3'(s[i] - "a")] = 1'b1;
    return r;
  endfunction

  // clocks spent polling (controller states POLL and POLL_WAIT) after the
  // first refresh: the requested poll of the two blocks
  int poll_clocks = 0;
  always @(posedge clk) if (!reset && n_done > 0 && (state == 5'd5 || state == 5'd6)) poll_clocks++;

  int n_done = 0;
  always @(posedge uclk) if (!reset && scan_done) n_done++;
  task automatic wait_done();
    int s;
    s = n_done;
    while (n_done == s) @(posedge uclk);
  endtask

  task automatic press(ref logic btn);
    btn = 1;
    repeat (650000 + 20) @(posedge uclk);
    btn = 0;
    repeat (650000 + 20) @(posedge uclk);
  endtask

  // UART receiver: 564 user clocks per bit, sampled mid-bit
  logic [7:0] rx_bytes [$];
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge tx);
      if (!reset) begin
        repeat (282) @(posedge uclk);
        for (int i = 0; i < 8; i++) begin
          repeat (564) @(posedge uclk);
          b[i] = tx;
        end
        repeat (564) @(posedge uclk);
        if (tx) rx_bytes.push_back(b);
      end
    end
  end

  // VGA counters
  int green = 0, grey = 0, lines = 0;
  logic hs_q = 1;
  always @(posedge uclk) begin
    hs_q <= hs;
    if (!reset) begin
      if ({vr, vg, vb} == 12'h0F0) green++;
      if ({vr, vg, vb} == 12'h888) grey++;
      if (hs_q && !hs) lines++;
    end
  end

  initial begin
    logic [9:0] want;
    repeat (10) @(posedge clk);
    reset <= 0;
    wait_done();
    check(!bus_error && !map_error && !busy, "first refresh without errors");
    check(wsa > 0 && rsa > 0 && wsb > 0 && rsb > 0, "both blocks were addressed and read");

    press(btn_cal);
    while (threshold == 0) @(posedge uclk);
    check(threshold >= 74 && threshold <= 76, $sformatf("threshold %0d", threshold));
    check(keys == 0, "no key pressed before touching");
    begin
      logic [11:0] cal;
      cal = threshold;
      trim = 5'b0101_1;      // 5 down
      @(posedge uclk);
      check(threshold == cal - 5, $sformatf("trimmed down: %0d from %0d", threshold, cal));
      trim = 5'b0011_0;      // 3 up
      @(posedge uclk);
      check(threshold == cal + 3, $sformatf("trimmed up: %0d from %0d", threshold, cal));
      trim = '0;
      @(posedge uclk);
    end
    // hex display: digits 0..7 from the left show {0, threshold, y bound, x bound};
    // 8 x 4 pads give bounds 7 and 3. Segments {g..a}, active low.
    do @(negedge uclk); while (strobe != 8'b1111_1110);
    check(seg == 7'b111_1000, $sformatf("rightmost digit shows %b, expected 7", seg));
    do @(negedge uclk); while (strobe != 8'b1111_1011);
    check(seg == 7'b011_0000, $sformatf("digit 5 shows %b, expected 3", seg));
    do @(negedge uclk); while (strobe != 8'b1110_1111);
    check(seg == ~hex_seg(threshold[3:0]), $sformatf("digit 3 shows %b", seg));

    touch_a = 16'h2020;      // pads 5 and 13 = keys 5 and 0
    want = 10'b10_0001_0000;
    fork press(btn_mode); join_none
    wait_done();
    // num_pad needs a full pass and a frame on the line
    rx_bytes.delete();
    @(posedge frame_sent);
    @(posedge frame_sent);
    repeat (1000) @(posedge uclk);
    check(keys == want, $sformatf("keys %b expected %b", keys, want));
    // one block within 10 ms: 16 windows of 75 000 clocks plus I2C writes
    check(poll_clocks > 2 * 8 * 75000 && poll_clocks < 2 * 1000000,
          $sformatf("two blocks polled in %0d clocks", poll_clocks));
    check(rx_bytes.size() >= 2, "two serial bytes received");
    if (rx_bytes.size() >= 2) begin
      int i;
      i = rx_bytes.size() - 2;             // the pair sent last
      check(rx_bytes[i] == {1'b0, want[5:0], 1'b0}, $sformatf("first byte %h", rx_bytes[i]));
      check(rx_bytes[i+1] == {1'b1, 2'b00, want[9:6], 1'b1}, $sformatf("second byte %h", rx_bytes[i+1]));
    end

    @(negedge vs); @(negedge vs);
    green = 0; grey = 0; lines = 0;
    @(negedge vs);
    check(green == 2 * 31 * 31, $sformatf("green pixels %0d", green));
    check(grey == 30 * 31 * 31, $sformatf("grey pixels %0d", grey));
    check(lines == 806, $sformatf("lines per frame %0d", lines));
    $display("poll of 2 blocks: %0d clocks (%0d us per block)", poll_clocks, poll_clocks / 200);
    $display("refreshes=%0d threshold=%0d keys=%b bytes=%0d", n_done, threshold, keys, rx_bytes.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (controller state %0d)", state);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
