// tb_touchpads_full_array: the largest array the default address width
// allows, 2^4 = 16 sensor blocks (256 pads), on one bus.
//
// First the blocks form a 4 x 4 square, each turned by a pseudo-random
// number of quarter turns, with the FPGA connector above a block of the top
// row. Then they are rearranged into a single row of 16 (64 x 4 pads, the
// widest extent the block grid holds) with the FPGA above the leftmost
// block, and a rescan is requested. After each refresh every coordinate is
// read through both user ports and compared with the model geometry, as in
// the smaller end-to-end test. The measurement window and the bus are
// shortened to keep the run short; the address width and all memory sizes
// are the defaults.
module tb_touchpads_full_array;
  localparam int N = 4, SENSE_TIME = 2000, HALF = 100, HALF_T = 125, NB = 16;
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
  int wx [NB], wy [NB], wr [NB];
  int fx = 1, fy = 1;
  initial for (int i = 0; i < NB; i++) begin
    wx[i] = i % 4; wy[i] = -(i / 4); wr[i] = (i * 7 + i / 3) % 4;
  end
  logic [15:0] touched [NB];
  function automatic logic [6:0] bus_addr(input int i);
    return 7'(8 + 7 * i);
  endfunction

  logic [NB-1:0] pull, nd_out, r1, r2, e1, e2;
  logic [3:0] nd_in [NB];
  logic [2:0] m1 [NB], m2 [NB];
  int ws [NB], rs [NB];
  assign scl = ~scl_oe;
  assign sda = ~(sda_oe | (|pull));
  assign s1 = |r1;
  assign s2 = |r2;

  for (genvar i = 0; i < NB; i++) begin : g_blk
    sensor_block_model #(.I2C_ADDR(bus_addr(i)), .HALF(HALF), .HALF_TOUCH(HALF_T)) blk (
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

  int n_done = 0, n_touch_seen = 0, n_empty_seen = 0, n_rescan = 0;
  always @(posedge uclk) if (!reset && done_out) n_done++;

  // expected reading per user coordinate: -1 no pad, else block*16+pad
  int expect_pad [64][64];
  int ex_x, ex_y;
  task automatic build_expect();
    int minx, miny, maxx, maxy;
    minx = 99; miny = 99; maxx = -99; maxy = -99;
    for (int b = 0; b < NB; b++) begin
      minx = wx[b] < minx ? wx[b] : minx; maxx = wx[b] > maxx ? wx[b] : maxx;
      miny = wy[b] < miny ? wy[b] : miny; maxy = wy[b] > maxy ? wy[b] : maxy;
    end
    ex_x = (maxx - minx + 1) * 4 - 1;
    ex_y = (maxy - miny + 1) * 4 - 1;
    for (int x = 0; x < 64; x++) for (int y = 0; y < 64; y++) expect_pad[x][y] = -1;
    for (int b = 0; b < NB; b++)
      for (int p = 0; p < 16; p++) begin
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
    // outside the bounds reads 0 (step past whichever bound is below 63)
    @(posedge uclk);
    if (ex_x < 63) begin x1 <= (N+2)'(ex_x + 1); y1 <= 0; end
    else begin x1 <= 0; y1 <= (N+2)'(ex_y + 1); end
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
    for (int b = 0; b < NB; b++) touched[b] = 16'(1 << (b % 16)) | 16'(1 << ((b * 5 + 3) % 16));
    repeat (5) @(posedge clk);
    reset <= 0;
    wait_done();
    check(!busy_out && !map_error && !bus_error, "16 blocks mapped without error");
    build_expect();
    check_all("square");
    // rearrange into one row of 16, FPGA above the leftmost block
    for (int i = 0; i < NB; i++) begin
      wx[i] = i; wy[i] = 0; wr[i] = (i * 3 + 1) % 4;
      touched[i] = 16'(16'h8001 >> (i % 8));
    end
    fx = 0; fy = 1;
    @(posedge uclk); rescan <= 1;
    @(posedge uclk); rescan <= 0;
    while (!busy_out) @(posedge uclk);
    wait_done();
    n_rescan++;
    check(!busy_out && !map_error && !bus_error, "row remapped without error");
    build_expect();
    check_all("row");
    check(n_touch_seen > 0 && n_rescan > 0, "touched pads and a rescan seen");
    check(n_empty_seen == 0, "both layouts are full rectangles: no empty coordinate");
    $display("full array: refreshes=%0d touched=%0d empty=%0d", n_done, n_touch_seen, n_empty_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (fsm state %0d)", fsm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
