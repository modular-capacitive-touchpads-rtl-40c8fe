// tb_xvga: runs one full frame and checks the 1024x768 timing: 1344 clocks
// per line, 806 lines per frame, hsync low for 136 clocks starting at
// hcount 1048, vsync low for 6 lines from line 771, blank outside the
// visible area.
module tb_xvga;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic hsync, vsync, blank;
  xvga dut (.vga_clock(clk), .reset, .hcount, .vcount, .hsync, .vsync, .blank);
  int checks = 0, failures = 0;
  int bad_h = 0, bad_v = 0, bad_b = 0, line_len = 0, lines = 0, hs_low = 0;
  initial begin
    repeat (3) @(posedge clk); reset <= 0;
    @(posedge clk);
    while (!(hcount == 0 && vcount == 0)) @(posedge clk);
    for (int i = 0; i < 1344 * 806; i++) begin
      @(negedge clk);
      if (hsync != !(hcount >= 1048 && hcount < 1184)) bad_h++;
      if (vsync != !(vcount >= 771 && vcount < 777)) bad_v++;
      if (blank != (hcount >= 1024 || vcount >= 768)) bad_b++;
      if (vcount == 0) line_len++;
      if (hcount == 0) lines++;
      if (vcount == 5 && !hsync) hs_low++;
      @(posedge clk);
    end
    checks += 6;
    if (bad_h) begin failures++; $display("FAIL: hsync wrong %0d times", bad_h); end
    if (bad_v) begin failures++; $display("FAIL: vsync wrong %0d times", bad_v); end
    if (bad_b) begin failures++; $display("FAIL: blank wrong %0d times", bad_b); end
    if (line_len != 1344) begin failures++; $display("FAIL: line length %0d", line_len); end
    if (lines != 806) begin failures++; $display("FAIL: lines %0d", lines); end
    if (hs_low != 136) begin failures++; $display("FAIL: hsync width %0d", hs_low); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
