// tb_cap_sense: measures square waves of several periods. The expected
// count is the number of rising edges of the input inside the window,
// counted here directly (the two-flop synchronizer may shift one edge in
// or out of the window, so +-1 is accepted). Also checks that done is a
// single pulse SENSE_TIME + 2 clocks after start is raised (one clock to
// see the edge of start, one to register done).
module tb_cap_sense;
  localparam int SENSE_TIME = 2000;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic sensor_in = 0, start = 0, done;
  logic [11:0] data;
  int half = 100;

  cap_sense #(.SENSE_TIME(SENSE_TIME)) dut (.clock(clk), .reset, .sensor_in, .start, .done, .data);

  initial forever begin #(half); sensor_in = ~sensor_in; end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int ref_edges;
  logic counting = 0;
  always @(posedge sensor_in) if (counting) ref_edges++;

  task automatic measure(input int h);
    int cyc, pulses;
    half = h;
    repeat (50) @(posedge clk);
    @(posedge clk);
    start <= 1;
    ref_edges = 0; counting = 1;
    cyc = 0; pulses = 0;
    @(posedge clk);
    start <= 0;
    cyc = 1;
    while (!done) begin @(posedge clk); cyc++; end
    counting = 0;
    check(cyc == SENSE_TIME + 2, $sformatf("done after %0d clocks", cyc));
    check(data >= ref_edges - 1 && data <= ref_edges + 1,
          $sformatf("half period %0d: count %0d, edges seen %0d", h, data, ref_edges));
    @(posedge clk);
    check(!done, "done lasts one clock");
    repeat (100) @(posedge clk);
    check(data >= ref_edges - 1 && data <= ref_edges + 1, "count held after done");
  endtask

  initial begin
    repeat (4) @(posedge clk);
    reset <= 0;
    measure(100);     // 100 rising edges expected in 20 us
    measure(125);     // slower oscillator: touched pad
    measure(37);
    measure(500);
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
