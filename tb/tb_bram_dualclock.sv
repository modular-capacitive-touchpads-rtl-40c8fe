// tb_bram_dualclock: writes on a 100 MHz clock, reads on an unrelated
// 37 MHz clock. Every word written is read back on the read clock one
// read clock after its address is presented.
module tb_bram_dualclock;
  localparam int LOGSIZE = 6, WIDTH = 12;
  logic wclk = 0, rclk = 0;
  always #5 wclk = ~wclk;
  always #13.5 rclk = ~rclk;
  logic we = 0;
  logic [LOGSIZE-1:0] waddr = 0, raddr = 0;
  logic [WIDTH-1:0] din = 0, dout;
  logic [WIDTH-1:0] model [2**LOGSIZE];

  bram_dualclock #(.LOGSIZE(LOGSIZE), .WIDTH(WIDTH)) dut (.wclk, .we, .waddr, .din, .rclk, .raddr, .dout);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    @(posedge rclk); raddr <= 9;
    @(posedge rclk); @(negedge rclk);
    check(dout == 0, "cleared at start-up");
    for (int i = 0; i < 2**LOGSIZE; i++) begin
      model[i] = WIDTH'($urandom);
      @(posedge wclk); we <= 1; waddr <= LOGSIZE'(i); din <= model[i];
    end
    @(posedge wclk); we <= 0;
    for (int i = 2**LOGSIZE - 1; i >= 0; i--) begin
      @(posedge rclk); raddr <= LOGSIZE'(i);
      @(posedge rclk); @(negedge rclk);
      check(dout == model[i], $sformatf("word %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
