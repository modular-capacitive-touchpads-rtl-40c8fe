// tb_rs232send: sends several bytes and decodes the line in the middle of
// each bit period: start bit 0, eight data bits LSB first, stop bit 1,
// each DIVISOR clocks long.
module tb_rs232send;
  localparam int DIVISOR = 16;
  logic clk = 0, reset = 1, start_send = 0, xmit_data, busy;
  logic [7:0] data = 0;
  always #5 clk = ~clk;
  rs232send #(.DIVISOR(DIVISOR)) dut (.clk, .reset, .data, .start_send, .xmit_data, .busy);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic send_and_decode(input logic [7:0] b);
    logic [7:0] got;
    @(posedge clk); data <= b; start_send <= 1;
    @(posedge clk); start_send <= 0;
    while (xmit_data) @(posedge clk);         // start bit edge
    repeat (DIVISOR / 2) @(posedge clk);
    check(!xmit_data, "start bit");
    for (int i = 0; i < 8; i++) begin
      repeat (DIVISOR) @(posedge clk);
      got[i] = xmit_data;
    end
    repeat (DIVISOR) @(posedge clk);
    check(xmit_data, "stop bit");
    check(got == b, $sformatf("sent %h got %h", b, got));
    while (busy) @(posedge clk);
  endtask
  initial begin
    repeat (3) @(posedge clk); reset <= 0;
    repeat (3) @(posedge clk);
    check(xmit_data && !busy, "line idles high");
    send_and_decode(8'hA5);
    send_and_decode(8'h00);
    send_and_decode(8'hFF);
    send_and_decode(8'h3C);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
