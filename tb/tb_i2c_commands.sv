// tb_i2c_commands: three sensor block models on one bus at bus addresses
// 0x05, 0x14 and 0x55. Checks that the scan numbers them 0, 1, 2 in bus
// address order, that each command reaches only the addressed block with
// the right effect, and the neighbor read format.
module tb_i2c_commands;
  import tp_pkg::*;
  localparam int N = 4;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic start = 0;
  logic [4:0] command = 0;
  logic [N-1:0] address_int = 0, max_int;
  logic done, bus_error, no_blocks;
  logic [7:0] return_data;
  logic scl_oe, sda_oe, scl, sda;
  logic [2:0] pull;
  logic [3:0] nd_in [3];
  logic [2:0] nd_out, en1, en2;
  logic [2:0] m1 [3], m2 [3];
  logic [2:0] r1, r2;
  int ws [3], rs [3];

  assign scl = ~scl_oe;
  assign sda = ~(sda_oe | (|pull));

  i2c_commands #(.N(N), .I2C_SPEED(2500000)) dut (
    .clk, .reset, .start, .command, .address_int, .done, .return_data, .bus_error,
    .max_internal_address(max_int), .no_blocks, .scl_i(scl), .scl_oe, .sda_i(sda), .sda_oe);

  localparam logic [6:0] ADDRS [3] = '{7'h05, 7'h14, 7'h55};
  for (genvar i = 0; i < 3; i++) begin : g_blk
    sensor_block_model #(.I2C_ADDR(ADDRS[i]), .HALF(50), .HALF_TOUCH(60)) blk (
      .scl, .sda, .sda_pull(pull[i]), .mclr_n(1'b1), .nd_in(nd_in[i]), .nd_out(nd_out[i]),
      .touched(16'h0), .rail1(r1[i]), .rail2(r2[i]), .mux1(m1[i]), .mux2(m2[i]),
      .en1(en1[i]), .en2(en2[i]), .writes_seen(ws[i]), .reads_seen(rs[i]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input logic [4:0] c, input logic [N-1:0] a);
    @(posedge clk);
    start <= 1; command <= c; address_int <= a;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    check(!done, "done falls while a command runs");
    while (!done) @(posedge clk);
  endtask

  initial begin
    nd_in[0] = 4'b0000; nd_in[1] = 4'b0000; nd_in[2] = 4'b1000;  // block 2 sees something on its left
    repeat (4) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    check(done, "idle after reset");
    run(CMD_SCAN_ADDRESSES, 0);
    check(max_int == 2 && !no_blocks, $sformatf("scan found max internal address %0d", max_int));
    run(CMD_NEIGHBOR_DETECT_HIGH, 1);
    check(nd_out == 3'b010, "neighbor detect on reaches internal address 1 only");
    run(CMD_NEIGHBOR_DETECT_LOW, 1);
    check(nd_out == 3'b000, "neighbor detect off");
    run(cmd_set_mux(3'd5), 0);
    check(m1[0] == 5 && m2[0] == 5 && m1[1] == 0, "mux select on internal address 0");
    run(CMD_SET_SENSE_RAILS_ON, 2);
    check(en1 == 3'b100 && en2 == 3'b100, "rails on for internal address 2");
    run(CMD_SET_SENSE_RAILS_OFF, 2);
    check(en1 == 3'b000 && en2 == 3'b000, "rails off");
    run(CMD_SENSE_NEIGHBORS, 2);
    check(return_data == 8'b0000_1000 && !bus_error, $sformatf("neighbor read %b", return_data));
    nd_in[1] = 4'b0110;  // right and bottom
    run(CMD_SENSE_NEIGHBORS, 1);
    check(return_data == 8'b0000_0011, $sformatf("neighbor read %b", return_data));
    check(rs[1] == 1 && rs[2] == 1 && rs[0] == 0, "reads went to the addressed blocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
