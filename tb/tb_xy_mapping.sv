// tb_xy_mapping: mapping against a command-level model of a physical
// layout. Four blocks lie on a world grid, each turned by its own
// rotation; the FPGA connector sits above block 3. The model answers
// NEIGHBOR_DETECT_HIGH/LOW and SENSE_NEIGHBORS from the geometry: edge e
// of a block turned r quarter turns clockwise faces world direction
// (e + r) mod 4, and an input is high when the block or FPGA in that
// direction drives its neighbor-detect output. Because the FPGA is above
// the first block, the map must reproduce the world layout exactly: same
// relative cells (shifted to start at 0) and same rotations.
// Checks the final grid written through the translation port, the bounds,
// one set and one done pulse, the number of commands, and, in a second
// run with the FPGA unplugged, map_error and an empty map.
module tb_xy_mapping;
  import tp_pkg::*;
  localparam int N = 4, NB = 4;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic start = 0, done, map_error, i2c_start, i2c_done = 1, fpga_nd;
  logic [4:0] i2c_command;
  logic [N-1:0] i2c_address, ct_x, ct_y, max_x, max_y;
  logic [7:0] ret = 0;
  logic ct_we, ct_set;
  logic [N+2:0] ct_data;

  xy_mapping #(.N(N)) dut (
    .clk, .reset, .start, .max_internal_address(N'(NB - 1)), .done, .map_error,
    .i2c_start, .i2c_command, .i2c_address, .i2c_done, .i2c_return_data(ret),
    .fpga_neighbor_detect(fpga_nd), .ct_we, .ct_x, .ct_y, .ct_data, .ct_set, .max_x, .max_y);

  // world layout
  int wx [NB] = '{ 0, 1, 1, -1};
  int wy [NB] = '{ 0, 0, -1, 0};
  int wr [NB] = '{ 2, 1, 0, 3};
  int fx = -1, fy = 1;          // FPGA connector cell, above block 3
  logic fpga_plugged = 1;
  logic nd [NB];

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic driven_at(input int x, input int y);
    for (int b = 0; b < NB; b++) if (wx[b] == x && wy[b] == y && nd[b]) return 1;
    return fpga_plugged && fpga_nd && x == fx && y == fy;
  endfunction

  function automatic logic [7:0] sense(input int b);
    logic [3:0] e_hi;   // indexed by edge: top, right, bottom, left
    for (int e = 0; e < 4; e++) begin
      int d, x, y;
      d = (e + wr[b]) % 4;
      x = wx[b] + (d == 1 ? 1 : d == 3 ? -1 : 0);
      y = wy[b] + (d == 0 ? 1 : d == 2 ? -1 : 0);
      e_hi[e] = driven_at(x, y);
    end
    return {4'b0000, e_hi[3], e_hi[0], e_hi[1], e_hi[2]};
  endfunction

  int n_high, n_low, n_sense;
  always @(posedge clk) if (i2c_start && !reset) begin
    automatic int a = i2c_address;
    if (i2c_command == CMD_NEIGHBOR_DETECT_HIGH) begin nd[a] = 1; n_high++; end
    else if (i2c_command == CMD_NEIGHBOR_DETECT_LOW) begin nd[a] = 0; n_low++; end
    else if (i2c_command == CMD_SENSE_NEIGHBORS) begin ret <= sense(a); n_sense++; end
    i2c_done <= 0;
    repeat (3 + $urandom_range(0, 5)) @(posedge clk);
    i2c_done <= 1;
  end

  logic [N+2:0] grid [16][16];
  int sets, dones;
  always @(posedge clk) if (!reset) begin
    if (ct_we) grid[ct_x][ct_y] <= ct_data;
    if (ct_set) sets++;
    if (done) dones++;
  end

  task automatic run_map();
    n_high = 0; n_low = 0; n_sense = 0; sets = 0; dones = 0;
    for (int x = 0; x < 16; x++) for (int y = 0; y < 16; y++) grid[x][y] = 7'h55;
    @(posedge clk); start <= 1;
    @(posedge clk); start <= 0;
    while (!done) @(posedge clk);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    int minx, miny, maxx, maxy;
    for (int b = 0; b < NB; b++) nd[b] = 0;
    repeat (4) @(posedge clk);
    reset <= 0;
    run_map();
    minx = 99; miny = 99; maxx = -99; maxy = -99;
    for (int b = 0; b < NB; b++) begin
      minx = (wx[b] < minx) ? wx[b] : minx; miny = (wy[b] < miny) ? wy[b] : miny;
      maxx = (wx[b] > maxx) ? wx[b] : maxx; maxy = (wy[b] > maxy) ? wy[b] : maxy;
    end
    check(!map_error, "no map error");
    check(sets == 1 && dones == 1, "one set and one done pulse");
    check(max_x == N'(maxx - minx) && max_y == N'(maxy - miny),
          $sformatf("bounds %0d,%0d", max_x, max_y));
    check(n_high == NB && n_low == NB && n_sense == NB * (NB - 1) + NB, "command counts");
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        logic [N+2:0] expct;
        expct = '0;
        for (int b = 0; b < NB; b++)
          if (wx[b] - minx == x && wy[b] - miny == y) expct = {1'b1, 2'(wr[b]), 4'(b)};
        check(grid[x][y] == expct, $sformatf("cell (%0d,%0d) = %b, expected %b", x, y, grid[x][y], expct));
      end
    // the FPGA unplugged: error and an empty map
    fpga_plugged = 0;
    run_map();
    check(map_error, "unplugged FPGA reported");
    begin
      int nonzero = 0;
      for (int x = 0; x < 16; x++) for (int y = 0; y < 16; y++) if (grid[x][y] != 0) nonzero++;
      check(nonzero == 0 && sets == 1, "empty map published");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
