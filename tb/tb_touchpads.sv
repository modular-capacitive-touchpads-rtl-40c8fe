// tb_touchpads: end-to-end test of the touchpads controller with three
// sensor block models on a shared I2C bus and shared sense rails, at a
// shortened measurement window and a faster bus.
//
// The blocks lie on a world grid with their own rotations; their
// neighbor-detect inputs are wired from the geometry (edge e of a block
// turned r quarter turns clockwise faces world direction (e + r) mod 4),
// and the FPGA connector sits above one block. Expected readings come from
// the physical model: pad p of a block sits at block-local column p mod 4,
// row 3 - p/4; turning the block moves local (u, v) to (v, 3 - u); user
// coordinates have y pointing down. A touched pad's oscillator runs at
// 4/5 of the untouched frequency.
//
// Sequence: power-up scan, map and first poll; a single poll requested by
// a mode pulse after the touch pattern changes, plus a second pulse during
// that poll, which must be remembered and served by one more poll; free running polls with
// mode held high; then a block is moved and turned, and a rescan must
// produce the new map; finally one block is pulled away from the array
// (it stays on the bus), which leaves another one unconnected too, and a
// rescan must map only the block still joined to the FPGA. After every
// completed refresh all coordinates
// inside the bounds are read through both user ports and compared.
// Each mechanism is counted and must occur.
module tb_touchpads;
  localparam int N = 4, SENSE_TIME = 2000, HALF = 100, HALF_T = 125, NB = 3;
  localparam int CNT_U = SENSE_TIME * 10 / (2 * HALF);
  localparam int CNT_T = SENSE_TIME * 10 / (2 * HALF_T);

  logic clk = 0, uclk = 0, reset = 1;
  always #5 clk = ~clk;
  always #13.5 uclk = ~uclk;

  logic mode = 0, rescan = 0, done_out, busy_out, map_error, bus_error;
  logic [N+1:0] xb, yb, x1 = 0, y1 = 0, x2 = 0, y2 = 0;
  logic [11:0] d1, d2;
  logic v1, v2;
  logic scl_oe, sda_oe, fpga_nd, mclr_n, s1, s2, scl, sda;
  logic [4:0] fsm;
  logic [N-1:0] pa, ca;

  touchpads #(.N(N), .I2C_SPEED(2500000), .SENSE_TIME(SENSE_TIME), .MCLR_CYCLES(16)) dut (
    .clk_100mhz(clk), .clk_user(uclk), .reset, .mode, .rescan_trig(rescan),
    .done_out, .busy_out, .x_upper_bound_out(xb), .y_upper_bound_out(yb),
    .x_coordinate(x1), .y_coordinate(y1), .sensor_data(d1),
    .x_coordinate2(x2), .y_coordinate2(y2), .sensor_data2(d2),
    .sensor_valid(v1), .sensor_valid2(v2),
    .scl_i(scl), .scl_oe, .sda_i(sda), .sda_oe, .fpga_neighbor_detect(fpga_nd),
    .sensor_blocks_reset_n(mclr_n), .sensor_1(s1), .sensor_2(s2),
    .master_fsm_state(fsm), .polling_int_addr(pa), .command_int_addr(ca),
    .map_error, .bus_error);

  // world layout; block i has bus address BUS[i] and becomes internal address i
  int wx [NB] = '{0, 1, 0};
  int wy [NB] = '{0, 0, -1};
  int wr [NB] = '{0, 1, 2};
  int fx = 0, fy = 1;
  logic [15:0] touched [NB];
  localparam logic [6:0] BUS [NB] = '{7'h10, 7'h23, 7'h40};

  logic [NB-1:0] pull, nd_out, r1, r2, e1, e2;
  logic [3:0] nd_in [NB];
  logic [2:0] m1 [NB], m2 [NB];
  int ws [NB], rs [NB];
  assign scl = ~scl_oe;
  assign sda = ~(sda_oe | (|pull));
  assign s1 = |r1;
  assign s2 = |r2;

  for (genvar i = 0; i < NB; i++) begin : g_blk
    sensor_block_model #(.I2C_ADDR(BUS[i]), .HALF(HALF), .HALF_TOUCH(HALF_T)) blk (
      .scl, .sda, .sda_pull(pull[i]), .mclr_n, .nd_in(nd_in[i]), .nd_out(nd_out[i]),
      .touched(touched[i]), .rail1(r1[i]), .rail2(r2[i]), .mux1(m1[i]), .mux2(m2[i]),
      .en1(e1[i]), .en2(e2[i]), .writes_seen(ws[i]), .reads_seen(rs[i]));
  end

  // neighbor-detect wiring from the geometry
  always_comb begin
    for (int b = 0; b < NB; b++)
      for (int e = 0; e < 4; e++) begin
        int d, x, y;
        d = (e + wr[b]) % 4;
        x = wx[b] + (d == 1 ? 1 : d == 3 ? -1 : 0);
        y = wy[b] + (d == 0 ? 1 : d == 2 ? -1 : 0);
        nd_in[b][e] = fpga_nd && x == fx && y == fy;
        for (int o = 0; o < NB; o++) if (wx[o] == x && wy[o] == y && nd_out[o]) nd_in[b][e] = 1;
      end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int n_done = 0, n_touch_seen = 0, n_empty_seen = 0, n_rescan = 0, n_single = 0, n_free = 0,
      n_queued = 0, n_detached = 0;
  always @(posedge uclk) if (!reset && done_out) n_done++;

  // expected reading per user coordinate: -1 no pad, else block*16+pad
  int expect_pad [32][32];
  bit mapped [NB];
  int ex_x, ex_y;
  task automatic build_expect();
    int minx, miny, maxx, maxy;
    bit reach [NB];
    bit grew;
    // only blocks joined to the one under the FPGA connector are mapped
    for (int b = 0; b < NB; b++) reach[b] = (wx[b] == fx && wy[b] == fy - 1);
    do begin
      grew = 0;
      for (int b = 0; b < NB; b++)
        for (int o = 0; o < NB; o++)
          if (reach[o] && !reach[b] &&
              ((wx[b] - wx[o]) * (wx[b] - wx[o]) + (wy[b] - wy[o]) * (wy[b] - wy[o])) == 1) begin
            reach[b] = 1; grew = 1;
          end
    end while (grew);
    for (int b = 0; b < NB; b++) mapped[b] = reach[b];
    minx = 99; miny = 99; maxx = -99; maxy = -99;
    for (int b = 0; b < NB; b++) if (reach[b]) begin
      minx = wx[b] < minx ? wx[b] : minx; maxx = wx[b] > maxx ? wx[b] : maxx;
      miny = wy[b] < miny ? wy[b] : miny; maxy = wy[b] > maxy ? wy[b] : maxy;
    end
    ex_x = (maxx - minx + 1) * 4 - 1;
    ex_y = (maxy - miny + 1) * 4 - 1;
    for (int x = 0; x < 32; x++) for (int y = 0; y < 32; y++) expect_pad[x][y] = -1;
    for (int b = 0; b < NB; b++)
      for (int p = 0; p < 16; p++) if (reach[b]) begin
        int u, v, t, nx, ny;
        u = p % 4; v = 3 - p / 4;
        for (int r = 0; r < wr[b]; r++) begin t = u; u = v; v = 3 - t; end
        nx = (wx[b] - minx) * 4 + u;
        ny = (wy[b] - miny) * 4 + v;
        expect_pad[nx][ex_y - ny] = b * 16 + p;
      end
  endtask

  task automatic check_all(input string tag);
    check(int'(xb) == ex_x && int'(yb) == ex_y, $sformatf("%s: bounds %0d,%0d expected %0d,%0d", tag, xb, yb, ex_x, ex_y));
    for (int x = 0; x <= ex_x; x++)
      for (int y = 0; y <= ex_y; y++) begin
        int e, got1, got2;
        @(posedge uclk);
        x1 <= (N+2)'(x); y1 <= (N+2)'(y);
        x2 <= (N+2)'(ex_x - x); y2 <= (N+2)'(ex_y - y);
        @(posedge uclk); @(posedge uclk); @(negedge uclk);
        got1 = int'(d1); got2 = int'(d2);
        check(v1 == (expect_pad[x][y] >= 0) && v2 == (expect_pad[ex_x - x][ex_y - y] >= 0),
              $sformatf("%s: valid flags at (%0d,%0d)", tag, x, y));
        e = expect_pad[x][y];
        if (e < 0) begin
          check(got1 == 0, $sformatf("%s: (%0d,%0d) no pad but read %0d", tag, x, y, got1));
          n_empty_seen++;
        end else begin
          int c;
          c = touched[e / 16][e % 16] ? CNT_T : CNT_U;
          check(got1 >= c - 1 && got1 <= c + 1,
                $sformatf("%s: (%0d,%0d) block %0d pad %0d read %0d expected %0d", tag, x, y, e / 16, e % 16, got1, c));
          if (touched[e / 16][e % 16]) n_touch_seen++;
        end
        e = expect_pad[ex_x - x][ex_y - y];
        check(e < 0 ? got2 == 0 : got2 >= (touched[e / 16][e % 16] ? CNT_T : CNT_U) - 1 &&
                                  got2 <= (touched[e / 16][e % 16] ? CNT_T : CNT_U) + 1,
              $sformatf("%s: port 2 (%0d,%0d) read %0d", tag, ex_x - x, ex_y - y, got2));
      end
    // outside the bounds reads 0
    @(posedge uclk); x1 <= (N+2)'(ex_x + 1); y1 <= 0;
    @(posedge uclk); @(posedge uclk); @(negedge uclk);
    check(d1 == 0, "outside the bounds reads 0");
  endtask

  task automatic wait_done();
    int start_n;
    start_n = n_done;
    while (n_done == start_n) @(posedge uclk);
    @(posedge uclk);
  endtask

  initial begin
    touched[0] = 16'h0001; touched[1] = 16'h8400; touched[2] = 16'h0060;
    repeat (5) @(posedge clk);
    reset <= 0;
    wait_done();
    check(!busy_out && !map_error, "mapped without error");
    check(!bus_error, "no bus error");
    build_expect();
    check_all("power-up");
    // single poll requested by a one-clock mode pulse
    touched[0] = 16'hF000; touched[1] = 16'h0003; touched[2] = 16'h1111;
    @(posedge uclk); mode <= 1;
    @(posedge uclk); mode <= 0;
    // a second pulse while that poll runs must be remembered and served
    repeat (2000) @(posedge uclk);
    check(fsm != 5'd9, "poll running when the second request arrives");
    @(posedge uclk); mode <= 1;
    @(posedge uclk); mode <= 0;
    wait_done();
    n_single++;
    wait_done();
    n_queued++;
    check_all("single poll");
    // free running: hold mode, expect back-to-back refreshes
    touched[0] = 16'h0; touched[1] = 16'hFFFF; touched[2] = 16'h0;
    @(posedge uclk); mode <= 1;
    wait_done();
    wait_done();
    wait_done();
    n_free++;
    mode <= 0;
    wait_done();       // the refresh that was running when mode fell
    check_all("free run");
    // move block 2 to the right of block 1 and turn it; rescan
    wx[2] = 2; wy[2] = 0; wr[2] = 3;
    touched[2] = 16'h0F0F;
    @(posedge uclk); rescan <= 1;
    @(posedge uclk); rescan <= 0;
    while (!busy_out) @(posedge uclk);
    wait_done();
    n_rescan++;
    check(!busy_out && !map_error, "remapped without error");
    build_expect();
    check_all("rescan");
    // pull block 1 away from the others (it stays on the bus): block 2 now
    // touches nothing either, so only block 0 may be mapped
    wx[1] = 5; wy[1] = 5;
    @(posedge uclk); rescan <= 1;
    @(posedge uclk); rescan <= 0;
    while (!busy_out) @(posedge uclk);
    wait_done();
    n_rescan++;
    build_expect();
    check(mapped[0] && !mapped[1] && !mapped[2], "model: only block 0 reachable");
    check(!busy_out && !map_error && !bus_error, "detached blocks: mapped without error");
    check_all("detached");
    n_detached++;
    check(n_touch_seen > 0, "touched pads seen");
    check(n_empty_seen > 0, "empty coordinates seen");
    check(n_single > 0 && n_queued > 0 && n_free > 0 && n_rescan > 1 && n_detached > 0, "all mechanisms exercised");
    $display("mechanisms: refreshes=%0d single=%0d queued=%0d free_run=%0d rescan=%0d detached=%0d touched=%0d empty=%0d",
             n_done, n_single, n_queued, n_free, n_rescan, n_detached, n_touch_seen, n_empty_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (fsm state %0d)", fsm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
