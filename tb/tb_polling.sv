// tb_polling: polls three blocks through a command-level model of the I2C
// command layer. The model keeps each block's rail enables and multiplexer
// select, and drives each sense rail with a square wave whose half period
// is a known function of {block, rail, select}. Checks: every one of the
// 48 pads is written exactly once, at {block, rail, select}, with a count
// within one edge of SENSE_TIME / period; rails are switched on and off
// for every block; only one block drives the rails at a time; done is a
// single pulse at the end.
module tb_polling;
  import tp_pkg::*;
  localparam int N = 4, SENSE_TIME = 1200, BLOCKS = 3;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic start = 0, i2c_done = 1, done, i2c_start, bram_we;
  logic [4:0] i2c_command;
  logic [N-1:0] iaddr;
  logic [N+3:0] bram_address;
  logic [11:0] bram_din;
  logic rail1 = 0, rail2 = 0;

  polling #(.N(N), .SENSE_TIME(SENSE_TIME)) dut (
    .clock(clk), .reset, .start, .i2c_done, .max_internal_address(N'(BLOCKS - 1)),
    .sensor_in1(rail1), .sensor_in2(rail2), .done, .i2c_start, .i2c_command,
    .internal_address(iaddr), .bram_address, .bram_we, .bram_din);

  logic en [BLOCKS];
  logic [2:0] sel [BLOCKS];
  int rails_on_cnt = 0, rails_off_cnt = 0;

  // half period (in 10 ns clocks) of pad {rail, select} of block b
  function automatic int half_of(input int b, input int rail, input int s);
    return 10 + 2 * b + 5 * rail + s;
  endfunction

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // command-level model of i2c_commands
  always @(posedge clk) if (i2c_start && !reset) begin
    automatic int a = iaddr;
    automatic logic [4:0] c = i2c_command;
    if (c == CMD_SET_SENSE_RAILS_ON) begin en[a] = 1; rails_on_cnt++; end
    else if (c == CMD_SET_SENSE_RAILS_OFF) begin en[a] = 0; rails_off_cnt++; end
    else if (c[4:3] == 2'b11) sel[a] = c[2:0];
    i2c_done <= 0;
    repeat (20 + $urandom_range(0, 30)) @(posedge clk);
    i2c_done <= 1;
  end

  function automatic int driver();
    int d = -1, n = 0;
    for (int b = 0; b < BLOCKS; b++) if (en[b]) begin d = b; n++; end
    return (n == 1) ? d : -1 - n;
  endfunction

  initial forever begin
    automatic int d = driver();
    if (d >= 0) begin #(10 * half_of(d, 0, sel[d])); rail1 = ~rail1; end
    else begin rail1 = 0; #10; end
  end
  initial forever begin
    automatic int d = driver();
    if (d >= 0) begin #(10 * half_of(d, 1, sel[d])); rail2 = ~rail2; end
    else begin rail2 = 0; #10; end
  end

  int writes [64];
  int value [64];
  int done_pulses = 0, conflicts = 0;
  always @(posedge clk) begin
    if (bram_we && !reset) begin writes[bram_address]++; value[bram_address] = bram_din; end
    if (done && !reset) done_pulses++;
    if (driver() < -2) conflicts++;
  end

  initial begin
    for (int b = 0; b < BLOCKS; b++) begin en[b] = 0; sel[b] = 0; end
    for (int i = 0; i < 64; i++) begin writes[i] = 0; value[i] = 0; end
    repeat (4) @(posedge clk);
    reset <= 0;
    repeat (4) @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    while (!done) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int b = 0; b < BLOCKS; b++)
      for (int r = 0; r < 2; r++)
        for (int s = 0; s < 8; s++) begin
          automatic int a = b * 16 + r * 8 + s;
          automatic int expct = SENSE_TIME / (2 * half_of(b, r, s));
          check(writes[a] == 1, $sformatf("pad %0d written %0d times", a, writes[a]));
          check(value[a] >= expct - 1 && value[a] <= expct + 1,
                $sformatf("pad %0d count %0d expected about %0d", a, value[a], expct));
        end
    for (int a = 48; a < 64; a++) check(writes[a] == 0, "no write beyond the last block");
    check(rails_on_cnt == BLOCKS && rails_off_cnt == BLOCKS, "rails on/off once per block");
    check(conflicts == 0, "one block on the rails at a time");
    check(done_pulses == 1, "done pulsed once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
