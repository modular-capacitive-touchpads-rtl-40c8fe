// tb_bram_sdp: writes a pattern of random words to the simple dual-port
// RAM, reads them back with the one-clock latency, and checks that a read
// of the word being written returns the old value.
module tb_bram_sdp;
  localparam int LOGSIZE = 6, WIDTH = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [LOGSIZE-1:0] waddr = 0, raddr = 0;
  logic [WIDTH-1:0] din = 0, dout;
  logic [WIDTH-1:0] model [2**LOGSIZE];

  bram_sdp #(.LOGSIZE(LOGSIZE), .WIDTH(WIDTH)) dut (.clk, .we, .waddr, .din, .raddr, .dout);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    raddr <= 5;
    @(posedge clk); @(negedge clk);
    check(dout == 0, "cleared at start-up");
    for (int i = 0; i < 2**LOGSIZE; i++) begin
      model[i] = WIDTH'($urandom);
      @(posedge clk); we <= 1; waddr <= LOGSIZE'(i); din <= model[i];
    end
    @(posedge clk); we <= 0;
    for (int i = 0; i < 2**LOGSIZE; i++) begin
      @(posedge clk); raddr <= LOGSIZE'(i);
      @(posedge clk); @(negedge clk);
      check(dout == model[i], $sformatf("word %0d", i));
    end
    // read during write of the same word returns the old value
    @(posedge clk); we <= 1; waddr <= 3; din <= ~model[3]; raddr <= 3;
    @(posedge clk); we <= 0; @(negedge clk);
    check(dout == model[3], "read-during-write returns old value");
    @(posedge clk); @(negedge clk);
    check(dout == ~model[3], "new value after the write");
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
