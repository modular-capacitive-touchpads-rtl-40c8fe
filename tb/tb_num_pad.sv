// tb_num_pad: a behavioural read port (two-clock latency) answers for the
// keypad area; the test picks random sets of touched keys and decodes the
// two serial bytes of each report: {0, keys[5:0], 0} and
// {1, 00, keys[9:6], 1}, where keys[k-1] is key k and keys[9] is key 0
// (keys 1-9 at x = (k-1) mod 3, y = (k-1) / 3; key 0 at (1, 3)).
module tb_num_pad;
  localparam int N = 4, DIVISOR = 8;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  logic [N+1:0] xq, yq;
  logic [11:0] pad_data;
  logic xmit, frame_sent;
  logic [9:0] keys, touched = 0;
  localparam logic [11:0] THRESH = 12'd60;

  num_pad #(.N(N), .DIVISOR(DIVISOR), .GAP(20)) dut (
    .clk, .reset, .pad_data, .threshold(THRESH), .x_coordinate(xq), .y_coordinate(yq),
    .xmit_data(xmit), .keys, .frame_sent);

  function automatic int key_at(input int x, input int y);
    if (x == 1 && y == 3) return 9;
    if (x < 3 && y < 3) return y * 3 + x;
    return -1;
  endfunction

  logic [11:0] r1;
  always_ff @(posedge clk) begin
    automatic int k = key_at(int'(xq), int'(yq));
    r1 <= (k < 0) ? 12'd0 : (touched[k] ? 12'd45 : 12'd80);
    pad_data <= r1;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic get_byte(output logic [7:0] b);
    while (xmit) @(posedge clk);
    repeat (DIVISOR / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      repeat (DIVISOR) @(posedge clk);
      b[i] = xmit;
    end
    repeat (DIVISOR) @(posedge clk);
  endtask

  initial begin
    logic [7:0] b0, b1;
    repeat (3) @(posedge clk); reset <= 0;
    for (int t = 0; t < 6; t++) begin
      touched = (t == 0) ? 10'h000 : (t == 1) ? 10'h3FF : 10'($urandom);
      // let a full report go by with the new state, then decode the next
      @(posedge frame_sent);
      get_byte(b0);
      get_byte(b1);
      check(b0[0] == 0 && b0[7] == 0 && b1[0] == 1 && b1[7] == 1, "marker bits");
      check(b0[6:1] == touched[5:0] && b1[4:1] == touched[9:6] && b1[6:5] == 0,
            $sformatf("keys %b decoded %b%b", touched, b1[4:1], b0[6:1]));
      check(keys == touched, "keys output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
