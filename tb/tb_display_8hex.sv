// tb_display_8hex: checks the seven-segment scan. With a 6-bit counter each
// digit is lit for 8 clocks. For several data words the testbench follows
// the strobes for two full scans and checks that exactly one digit is
// enabled at a time, in order from the leftmost, each for 8 clocks, and
// that the segments show that digit's nibble in a font written out here
// independently (segment lists per hex digit).
module tb_display_8hex;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  logic [31:0] data;
  logic [6:0] seg;
  logic [7:0] strobe;

  display_8hex #(.COUNT_BITS(6)) dut (.clk, .reset, .data, .seg, .strobe);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // segments lit per digit, as letters a..g
  function automatic logic [6:0] font(input logic [3:0] h);
    string s;
    logic [6:0] r;
    case (h)
      0: s = "abcdef";  1: s = "bc";     2: s = "abdeg";  3: s = "abcdg";
      4: s = "bcfg";    5: s = "acdfg";  6: s = "acdefg"; 7: s = "abc";
      8: s = "abcdefg"; 9: s = "abcfg";  10: s = "abcefg"; 11: s = "cdefg";
      12: s = "adef";   13: s = "bcdeg"; 14: s = "adefg"; default: s = "aefg";
    endcase
    r = '0;
    for (int i = 0; i < s.len(); i++) r[3'(s[i] - "a")] = 1'b1;
    return r;
  endfunction

  initial begin : main
    static logic [31:0] words [4] = '{32'h0123_4567, 32'h89AB_CDEF, 32'hDEAD_BEEF, 32'h0000_000F};
    data = words[0];
    repeat (3) @(posedge clk);
    reset <= 0;
    foreach (words[w]) begin
      data <= words[w];
      // wait for the leftmost digit to come on
      do @(negedge clk); while (strobe == 8'b0111_1111);
      do @(negedge clk); while (strobe != 8'b0111_1111);
      for (int pass = 0; pass < 2; pass++)
        for (int d = 0; d < 8; d++) begin
          for (int c = 0; c < 8; c++) begin
            check(strobe == ~(8'h80 >> d), $sformatf("word %0d digit %0d clock %0d strobe %b", w, d, c, strobe));
            check(seg == ~font(words[w][31 - 4 * d -: 4]),
                  $sformatf("word %0d digit %0d seg %b", w, d, seg));
            @(negedge clk);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
