// rs232send: 8N1 serial transmitter. A one-clock start_send pulse while
// busy is low loads data; the line then sends a start bit (0), the eight
// data bits LSB first and a stop bit (1), each DIVISOR clocks long, and
// idles high. busy is high from the clock after start_send until the stop
// bit has been sent. The default divisor gives 115200 baud from 100 MHz.
module rs232send #(
  parameter int unsigned DIVISOR = 868
) (
  input  logic       clk,
  input  logic       reset,
  input  logic [7:0] data,
  input  logic       start_send,
  output logic       xmit_data,
  output logic       busy
);

  logic [$clog2(DIVISOR+1)-1:0] count;
  logic [9:0] shreg;
  logic [3:0] bits_left;

  assign busy = (bits_left != 4'd0);

  always_ff @(posedge clk) begin
    if (reset) begin
      count     <= '0;
      shreg     <= '1;
      bits_left <= '0;
      xmit_data <= 1'b1;
    end else if (!busy) begin
      xmit_data <= 1'b1;
      if (start_send) begin
        shreg     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        count     <= '0;
      end
    end else begin
      xmit_data <= shreg[0];
      if (count == ($bits(count))'(DIVISOR - 1)) begin
        count     <= '0;
        shreg     <= {1'b1, shreg[9:1]};
        bits_left <= bits_left - 1'b1;
      end else begin
        count <= count + 1'b1;
      end
    end
  end

endmodule
