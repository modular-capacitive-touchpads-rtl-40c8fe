// tb_coordinate_translation: an L-shaped layout of three blocks with
// rotations 0, 1 and 3, written through the mapping port and published
// with set_output. The expected address of every pad coordinate is built
// from the physical model: pad p of a block sits at block-local column
// p mod 4 and row 3 - p/4; turning the block r quarter turns clockwise
// moves local (u, v) to (v, 3 - u); the user coordinates (quadrant 4) have
// y pointing down. Checks every coordinate inside the bounds, the bounds,
// invalid cells, out-of-bounds requests, the one-clock latency and the
// double buffering (writes before set_output are not visible).
// Three more instances with XY_QUADRANT = 1, 2 and 3 see the same writes
// and queries; their answers are checked against the same model, mirrored:
// quadrant 1 has the origin bottom-left with y up, 2 bottom-right, 3
// top-right.
module tb_coordinate_translation;
  localparam int N = 4;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic set_output = 0, write_enable = 0, valid;
  logic [N-1:0] x_address = 0, y_address = 0, max_x_in = 0, max_y_in = 0;
  logic [N+2:0] data_in = 0;
  logic [N+1:0] xc = 0, yc = 0, max_x_out, max_y_out;
  logic [N+3:0] address;

  coordinate_translation #(.N(N), .XY_QUADRANT(4)) dut (
    .clk, .reset, .set_output, .write_enable, .x_address, .y_address, .data_in,
    .max_x_bound_in(max_x_in), .max_y_bound_in(max_y_in),
    .x_coordinate(xc), .y_coordinate(yc), .max_x_bound_out(max_x_out), .max_y_bound_out(max_y_out),
    .valid, .address);

  logic [3:1] vq;
  logic [N+3:0] aq [3:1];
  for (genvar q = 1; q <= 3; q++) begin : g_quad
    logic [N+1:0] mxo, myo;
    coordinate_translation #(.N(N), .XY_QUADRANT(q)) dutq (
      .clk, .reset, .set_output, .write_enable, .x_address, .y_address, .data_in,
      .max_x_bound_in(max_x_in), .max_y_bound_in(max_y_in),
      .x_coordinate(xc), .y_coordinate(yc), .max_x_bound_out(mxo), .max_y_bound_out(myo),
      .valid(vq[q]), .address(aq[q]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // block grid (native, y up): internal address, rotation, cell
  localparam int NB = 3;
  int bx [NB] = '{0, 1, 1};
  int by [NB] = '{0, 0, 1};
  int br [NB] = '{0, 1, 3};
  int ba [NB] = '{5, 2, 9};

  int exp_addr [8][8];   // [x][y] user coordinates, -1 = no pad

  task automatic write_cell(input int x, input int y, input logic [N+2:0] d);
    @(posedge clk);
    write_enable <= 1; x_address <= N'(x); y_address <= N'(y); data_in <= d;
    @(posedge clk);
    write_enable <= 0;
  endtask

  task automatic query(input int x, input int y, output logic v, output logic [N+3:0] a);
    @(posedge clk);
    xc <= (N+2)'(x); yc <= (N+2)'(y);
    @(posedge clk);   // dut registers the request here
    @(negedge clk);
    v = valid; a = address;
  endtask

  initial begin
    logic v;
    logic [N+3:0] a;
    for (int x = 0; x < 8; x++) for (int y = 0; y < 8; y++) exp_addr[x][y] = -1;
    for (int b = 0; b < NB; b++)
      for (int p = 0; p < 16; p++) begin
        int u, vv, t, wx, wy;
        u = p % 4; vv = 3 - p / 4;
        for (int r = 0; r < br[b]; r++) begin t = u; u = vv; vv = 3 - t; end
        wx = bx[b] * 4 + u;
        wy = by[b] * 4 + vv;
        exp_addr[wx][7 - wy] = ba[b] * 16 + p;   // quadrant 4: y down, 8 rows
      end
    repeat (4) @(posedge clk);
    reset <= 0;
    // an old frame: everything in cell (0,0) valid -> must disappear after two swaps
    write_cell(0, 0, {1'b1, 2'd0, 4'd7});
    @(posedge clk); set_output <= 1; max_x_in <= 0; max_y_in <= 0;
    @(posedge clk); set_output <= 0;
    query(0, 0, v, a);
    check(v && a == {4'd7, 4'd0}, "first frame visible after set_output");
    // build the real map in the back frame: clear, then write the blocks
    for (int x = 0; x < 16; x++) for (int y = 0; y < 16; y++) write_cell(x, y, '0);
    for (int b = 0; b < NB; b++) write_cell(bx[b], by[b], {1'b1, 2'(br[b]), 4'(ba[b])});
    query(0, 0, v, a);
    check(v && a == {4'd7, 4'd0}, "back-frame writes invisible before set_output");
    @(posedge clk); set_output <= 1; max_x_in <= 1; max_y_in <= 1;
    @(posedge clk); set_output <= 0;
    @(posedge clk);
    check(max_x_out == 7 && max_y_out == 7, "bounds in pad coordinates");
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 8; y++) begin
        query(x, y, v, a);
        if (exp_addr[x][y] < 0) check(!v, $sformatf("(%0d,%0d) has no pad", x, y));
        else check(v && a == (N+4)'(exp_addr[x][y]),
                   $sformatf("(%0d,%0d) -> %h valid %0d, expected %h", x, y, a, v, exp_addr[x][y]));
        for (int q = 1; q <= 3; q++) begin
          int nx, ny, e;
          nx = (q == 1) ? x : 7 - x;          // native column
          ny = (q == 3) ? 7 - y : y;          // native row, y up
          e = exp_addr[nx][7 - ny];
          if (e < 0) check(!vq[q], $sformatf("quadrant %0d (%0d,%0d) has no pad", q, x, y));
          else check(vq[q] && aq[q] == (N+4)'(e),
                     $sformatf("quadrant %0d (%0d,%0d) -> %h, expected %h", q, x, y, aq[q], e));
        end
      end
    query(8, 0, v, a);
    check(!v, "x beyond bounds invalid");
    query(0, 9, v, a);
    check(!v, "y beyond bounds invalid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
