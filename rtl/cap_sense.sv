// cap_sense: frequency counter for one sense rail.
//
// A sensor block connects one RC oscillator (about 100 kHz when nobody
// touches the pad) to the rail. A touch adds capacitance and lowers the
// frequency, so fewer rising edges arrive in a fixed window. On a rising
// edge of start the module clears its count and counts rising edges of
// sensor_in for SENSE_TIME clocks (750 us at 100 MHz by default), then
// pulses done for one clock; data holds the count (saturating at 4095)
// until the next measurement.
//
// The rail is asynchronous and goes through a two-flop synchronizer first,
// so an edge is counted two to three clocks after it happens. The window and
// the rising-edge count follow the document; the synchronizer and the
// saturation are this design's own.
module cap_sense #(
  parameter int unsigned SENSE_TIME = 75000
) (
  input  logic        clock,
  input  logic        reset,
  input  logic        sensor_in,
  input  logic        start,
  output logic        done,
  output logic [11:0] data
);

  logic [1:0] sync;
  logic       prev_in, prev_start, reading;
  logic [$clog2(SENSE_TIME+1)-1:0] clocks;

  always_ff @(posedge clock) begin
    if (reset) begin
      sync       <= '0;
      prev_in    <= 1'b0;
      prev_start <= 1'b0;
      reading    <= 1'b0;
      clocks     <= '0;
      done       <= 1'b0;
      data       <= '0;
    end else begin
      sync       <= {sync[0], sensor_in};
      prev_in    <= sync[1];
      prev_start <= start;
      done       <= 1'b0;
      if (start && !prev_start) begin
        reading <= 1'b1;
        clocks  <= '0;
        data    <= '0;
      end else if (reading) begin
        if (clocks == ($bits(clocks))'(SENSE_TIME - 1)) begin
          reading <= 1'b0;
          done    <= 1'b1;
        end
        clocks <= clocks + 1'b1;
        if (sync[1] && !prev_in && data != 12'hFFF) data <= data + 1'b1;
      end
    end
  end

endmodule
