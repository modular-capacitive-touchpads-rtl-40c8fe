// tb_debounce: glitches shorter than DELAY clocks must not reach the
// output; a level held for DELAY clocks must, within DELAY + 2 clocks.
module tb_debounce;
  localparam int DELAY = 50;
  logic clk = 0, reset = 1, noisy = 0, clean;
  always #5 clk = ~clk;
  debounce #(.DELAY(DELAY)) dut (.clk, .reset, .noisy, .clean);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  int cyc;
  logic seen;
  initial begin
    repeat (3) @(posedge clk); reset <= 0;
    // bouncing press: pulses shorter than DELAY
    for (int i = 0; i < 10; i++) begin
      @(posedge clk); noisy <= 1;
      repeat (5 + i) @(posedge clk); noisy <= 0;
      repeat (3) @(posedge clk);
    end
    seen = 0;
    repeat (DELAY + 5) begin @(posedge clk); if (clean) seen = 1; end
    check(!seen && !clean, "glitches ignored");
    @(posedge clk); noisy <= 1; cyc = 0;
    while (!clean && cyc < 4 * DELAY) begin @(posedge clk); cyc++; end
    check(clean, "steady press passes");
    check(cyc >= DELAY && cyc <= DELAY + 2, $sformatf("press passed after %0d clocks", cyc));
    @(posedge clk); noisy <= 0; cyc = 0;
    while (clean && cyc < 4 * DELAY) begin @(posedge clk); cyc++; end
    check(!clean && cyc >= DELAY && cyc <= DELAY + 2, $sformatf("release passed after %0d clocks", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
