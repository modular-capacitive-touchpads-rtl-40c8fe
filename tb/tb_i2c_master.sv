// tb_i2c_master: one-byte I2C writes and reads against a sensor block
// model. Checks the byte the slave receives, the byte read back, a missed
// acknowledge for an absent address, and the transaction length in clocks
// (EXPECT_CYCLES below).
module tb_i2c_master;
  localparam int PRESCALE = 10;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic cmd_valid = 0, cmd_read = 0;
  logic [6:0] cmd_address = 0;
  logic [7:0] wdata = 0, rdata;
  logic cmd_ready, done, missed_ack;
  logic scl_oe, sda_oe, sda_pull, scl, sda;
  logic nd_out, rail1, rail2, en1, en2;
  logic [2:0] mux1, mux2;
  int ws, rs;
  logic [3:0] nd_in = 4'b0101;

  assign scl = ~scl_oe;
  assign sda = ~(sda_oe | sda_pull);

  i2c_master #(.PRESCALE(PRESCALE)) dut (
    .clk, .rst, .cmd_valid, .cmd_read, .cmd_address, .wdata, .cmd_ready, .rdata, .done, .missed_ack,
    .scl_i(scl), .scl_oe, .sda_i(sda), .sda_oe);

  sensor_block_model #(.I2C_ADDR(7'h2A), .HALF(50), .HALF_TOUCH(60)) blk (
    .scl, .sda, .sda_pull, .mclr_n(1'b1), .nd_in, .nd_out, .touched(16'h0), .rail1, .rail2,
    .mux1, .mux2, .en1, .en2, .writes_seen(ws), .reads_seen(rs));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xfer(input logic rd, input logic [6:0] a, input logic [7:0] d, output int cycles);
    @(posedge clk);
    cmd_valid <= 1; cmd_read <= rd; cmd_address <= a; wdata <= d;
    @(posedge clk);
    cmd_valid <= 0;
    cycles = 1;
    while (!done) begin @(posedge clk); cycles++; end
  endtask

  int cyc;
  // START (2 quarters) + 18 bits x 4 quarters + STOP (4 quarters), plus the
  // clock in which the command is taken and the clock that registers done
  localparam int EXPECT_CYCLES = (2 + 18 * 4 + 4) * PRESCALE + 2;

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(cmd_ready, "ready after reset");
    xfer(0, 7'h2A, 8'b0110_0000, cyc);
    check(!missed_ack, "write acknowledged");
    check(nd_out == 1, "slave executed neighbor-detect on");
    check(cyc == EXPECT_CYCLES, $sformatf("write took %0d clocks, expected %0d", cyc, EXPECT_CYCLES));
    xfer(0, 7'h2A, 8'b11_101_011, cyc);
    check(mux2 == 3'b101 && mux1 == 3'b011, "mux byte received intact");
    xfer(1, 7'h2A, 8'h00, cyc);
    check(!missed_ack, "read acknowledged");
    // nd_in top=1, bottom=1 -> {left,top,right,bottom} = 0101
    check(rdata == 8'b0101_0000, $sformatf("read byte %b", rdata));
    xfer(0, 7'h11, 8'h00, cyc);
    check(missed_ack, "absent address reports missed ack");
    check(ws == 2 && rs == 1, "slave saw exactly the transactions meant for it");
    repeat (20) @(posedge clk);
    check(scl && sda, "bus released when idle");
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
