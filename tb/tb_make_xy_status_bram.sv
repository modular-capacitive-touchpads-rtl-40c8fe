// tb_make_xy_status_bram: the builder runs against behavioural stand-ins
// for the coordinate translation (one-clock latency; a pad exists where
// (x + 2y) mod 5 != 0, at address x*7 + y) and the sensor state RAM
// (one-clock latency, value = 3*address + 1). Checks that every coordinate
// inside the bounds is written exactly once with the right value (0 where
// there is no pad), nothing outside, done once, and the run length
// (X+1)(Y+1) + 4 clocks from start to done.
module tb_make_xy_status_bram;
  localparam int N = 4;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic start = 0, done, busy, ct_valid, xy_we;
  logic [N+1:0] xb = 0, yb = 0, ct_x, ct_y;
  logic [N+3:0] ct_address, state_raddr;
  logic [11:0] state_dout, xy_din;
  logic [2*N+3:0] xy_addr;

  make_xy_status_bram #(.N(N)) dut (
    .clk, .reset, .start, .done, .busy, .x_upper_bound(xb), .y_upper_bound(yb),
    .ct_x, .ct_y, .ct_valid, .ct_address, .state_raddr, .state_dout, .xy_we, .xy_addr, .xy_din);

  always_ff @(posedge clk) begin
    ct_valid   <= ((int'(ct_x) + 2 * int'(ct_y)) % 5) != 0;
    ct_address <= (N+4)'(int'(ct_x) * 7 + int'(ct_y));
    state_dout <= 12'(3 * int'(state_raddr) + 1);
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cnt [4096];
  int val [4096];
  int dones;
  always @(posedge clk) if (!reset) begin
    if (xy_we) begin cnt[xy_addr]++; val[xy_addr] = xy_din; end
    if (done) dones++;
  end

  task automatic run(input int X, input int Y);
    int cyc;
    for (int i = 0; i < 4096; i++) begin cnt[i] = 0; val[i] = 0; end
    dones = 0;
    xb <= (N+2)'(X); yb <= (N+2)'(Y);
    @(posedge clk); start <= 1;
    @(posedge clk); start <= 0;
    cyc = 1;
    while (!done) begin @(posedge clk); cyc++; end
    repeat (5) @(posedge clk);
    check(cyc == (X + 1) * (Y + 1) + 4, $sformatf("%0dx%0d took %0d clocks", X + 1, Y + 1, cyc));
    check(dones == 1, "one done pulse");
    for (int x = 0; x < 64; x++)
      for (int y = 0; y < 64; y++) begin
        int a, e;
        a = x * 64 + y;
        if (x <= X && y <= Y) begin
          e = (((x + 2 * y) % 5) != 0) ? (3 * ((x * 7 + y) % 256) + 1) : 0;
          check(cnt[a] == 1 && val[a] == e, $sformatf("(%0d,%0d) got %0d x%0d, expected %0d", x, y, val[a], cnt[a], e));
        end else if (cnt[a] != 0) check(0, $sformatf("(%0d,%0d) written outside bounds", x, y));
      end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    reset <= 0;
    run(7, 3);
    run(11, 15);
    run(0, 0);
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
