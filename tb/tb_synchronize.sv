// tb_synchronize: random input sequence; the output must equal the input
// as it was NSYNC clocks earlier, and be 0 during reset.
module tb_synchronize;
  localparam int NSYNC = 3;
  logic clk = 0, reset = 1, in = 0, out;
  always #5 clk = ~clk;
  synchronize #(.NSYNC(NSYNC)) dut (.clk, .reset, .in, .out);
  logic hist [$];
  int checks = 0, failures = 0;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++; if (out !== 0) begin failures++; $display("FAIL: reset"); end
    reset = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      in = 1'($urandom);
      hist.push_back(in);
      @(posedge clk); #1;
      if (hist.size() > NSYNC) void'(hist.pop_front());
      if (i >= NSYNC - 1) begin
        checks++;
        if (out !== hist[0]) begin failures++; $display("FAIL: cycle %0d", i); end
      end
    end
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
