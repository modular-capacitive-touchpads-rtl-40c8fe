// tb_simple_calibration: a behavioural read port (two-clock latency)
// holds readings for a 12x8 array with some zero (no pad) coordinates.
// The threshold after calibration must be the smallest nonzero reading,
// computed here directly; a second calibration after the readings change
// must follow them.
module tb_simple_calibration;
  localparam int N = 4;
  logic clk = 0, reset = 1, start = 0, done, busy;
  always #5 clk = ~clk;
  logic [N+1:0] xq, yq;
  logic [11:0] pad_data, threshold;
  int offset = 0;

  simple_calibration #(.N(N)) dut (
    .clk, .reset, .start, .done, .busy, .x_upper_bound(6'd11), .y_upper_bound(6'd7),
    .x_coordinate(xq), .y_coordinate(yq), .pad_data, .threshold);

  function automatic logic [11:0] reading(input int x, input int y);
    if ((3 * x + y) % 5 == 0) return 0;
    return 12'(((x * 37 + y * 91 + offset) % 200) + 40);
  endfunction

  logic [11:0] r1;
  always_ff @(posedge clk) begin
    r1 <= reading(int'(xq), int'(yq));
    pad_data <= r1;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic calibrate();
    int m;
    m = 4095;
    for (int x = 0; x <= 11; x++) for (int y = 0; y <= 7; y++)
      if (reading(x, y) != 0 && reading(x, y) < m) m = reading(x, y);
    @(posedge clk); start <= 1;
    @(posedge clk); start <= 0;
    while (!done) @(posedge clk);
    @(negedge clk);
    check(threshold == 12'(m), $sformatf("threshold %0d, minimum %0d", threshold, m));
    check(!busy, "idle after calibration");
  endtask

  initial begin
    repeat (3) @(posedge clk); reset <= 0;
    @(negedge clk);
    check(threshold == 0, "no threshold before calibration");
    calibrate();
    offset = 57;
    calibrate();
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
