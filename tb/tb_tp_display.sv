// tb_tp_display: drives the display from the VGA timing generator and a
// behavioural read port (two-clock latency) holding a known reading per
// coordinate. For the first 120 lines every output pixel is compared with
// the colour expected for the pixel three clocks earlier: green below the
// threshold, grey at or above it, black for no pad, outside the 8x8 array,
// on grid lines or in blanking. Also checks that hs/vs are the syncs
// delayed by three clocks.
module tb_tp_display;
  localparam int N = 4;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic hsync, vsync, blank, hs, vs;
  logic [N+1:0] xq, yq;
  logic [11:0] pad_data, rgb;
  localparam logic [11:0] THRESH = 12'd50;

  xvga timing (.vga_clock(clk), .reset, .hcount, .vcount, .hsync, .vsync, .blank);
  tp_display #(.N(N)) dut (
    .clk, .reset, .hcount, .vcount, .hsync, .vsync, .blank, .pad_size_log2(3'd3),
    .threshold(THRESH), .x_upper_bound(6'd7), .y_upper_bound(6'd7),
    .x_coordinate(xq), .y_coordinate(yq), .pad_data, .rgb, .hs, .vs);

  function automatic logic [11:0] reading(input int x, input int y);
    if ((x + y) % 7 == 3) return 0;           // no pad
    return 12'(20 + 9 * x + 5 * y);           // some below, some above 50
  endfunction

  logic [11:0] r1;
  always_ff @(posedge clk) begin
    r1 <= reading(int'(xq), int'(yq));
    pad_data <= r1;
  end

  logic [10:0] hd [3];
  logic [9:0] vd [3];
  logic bd [3], hsd [3], vsd [3];
  always_ff @(posedge clk) begin
    hd <= '{hcount, hd[0], hd[1]};
    vd <= '{vcount, vd[0], vd[1]};
    bd <= '{blank, bd[0], bd[1]};
    hsd <= '{hsync, hsd[0], hsd[1]};
    vsd <= '{vsync, vsd[0], vsd[1]};
  end

  int checks = 0, failures = 0, bad = 0, greens = 0, greys = 0;
  initial begin
    repeat (3) @(posedge clk); reset <= 0;
    while (!(hcount == 0 && vcount == 0)) @(posedge clk);
    repeat (4) @(posedge clk);
    for (int i = 0; i < 1344 * 120; i++) begin
      @(negedge clk);
      begin
        int h, v, x, y;
        logic [11:0] e;
        h = hd[2]; v = vd[2]; x = h >> 3; y = v >> 3;
        if (bd[2] || x > 7 || y > 7 || h % 8 == 0 || v % 8 == 0 || reading(x, y) == 0) e = 0;
        else if (reading(x, y) < THRESH) e = 12'h0F0;
        else e = 12'h888;
        if (rgb != e) begin bad++; if (bad < 5) $display("FAIL: pixel %0d,%0d rgb %h expected %h", h, v, rgb, e); end
        if (hs != hsd[2] || vs != vsd[2]) bad++;
        if (rgb == 12'h0F0) greens++;
        if (rgb == 12'h888) greys++;
      end
      @(posedge clk);
    end
    checks += 3;
    if (bad) failures++;
    if (greens == 0) begin failures++; $display("FAIL: no touched pad drawn"); end
    if (greys == 0) begin failures++; $display("FAIL: no untouched pad drawn"); end
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
