// debounce: cleans up a mechanical button or switch. clean takes the value
// of noisy once noisy has held that value for DELAY consecutive clocks
// (10 ms at 100 MHz by default); shorter glitches are ignored. Resets to 0.
module debounce #(
  parameter int unsigned DELAY = 1000000
) (
  input  logic clk,
  input  logic reset,
  input  logic noisy,
  output logic clean
);

  logic [$clog2(DELAY+1)-1:0] count;
  logic last;

  always_ff @(posedge clk) begin
    if (reset) begin
      count <= '0;
      last  <= 1'b0;
      clean <= 1'b0;
    end else if (noisy != last) begin
      last  <= noisy;
      count <= '0;
    end else if (count == ($bits(count))'(DELAY - 1)) begin
      clean <= last;
    end else begin
      count <= count + 1'b1;
    end
  end

endmodule
