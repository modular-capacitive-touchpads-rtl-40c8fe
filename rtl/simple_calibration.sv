// simple_calibration: sets the touch threshold from the current readings.
//
// On a start pulse the module walks every coordinate of the pad array
// through a user read port of the touchpads block (y fastest), waits
// LATENCY clocks for each reading, and keeps the smallest nonzero edge
// count. When the walk ends that minimum becomes threshold and done pulses
// for one clock; busy is high during the walk. A pad then counts as touched
// when its reading is below threshold, i.e. when it reads lower than the
// lowest untouched pad did at calibration time. Zero readings mark
// coordinates without a pad and are ignored. threshold is 0 until the first
// calibration, so nothing reads as touched before it.
//
// Using the minimum reading follows the document; ignoring zeros, the
// absence of a margin and the walk timing are this design's own.
module simple_calibration #(
  parameter int unsigned N       = 4,
  parameter int unsigned LATENCY = 3
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         start,
  output logic         done,
  output logic         busy,
  input  logic [N+1:0] x_upper_bound,
  input  logic [N+1:0] y_upper_bound,
  output logic [N+1:0] x_coordinate,
  output logic [N+1:0] y_coordinate,
  input  logic [11:0]  pad_data,
  output logic [11:0]  threshold
);

  logic [$clog2(LATENCY+1)-1:0] wait_cnt;
  logic [11:0] min_val;

  always_ff @(posedge clk) begin
    if (reset) begin
      busy         <= 1'b0;
      done         <= 1'b0;
      x_coordinate <= '0;
      y_coordinate <= '0;
      wait_cnt     <= '0;
      min_val      <= '1;
      threshold    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy         <= 1'b1;
          x_coordinate <= '0;
          y_coordinate <= '0;
          wait_cnt     <= '0;
          min_val      <= '1;
        end
      end else if (wait_cnt != ($bits(wait_cnt))'(LATENCY)) begin
        wait_cnt <= wait_cnt + 1'b1;
      end else begin
        logic [11:0] m;
        wait_cnt <= '0;
        m = (pad_data != 12'd0 && pad_data < min_val) ? pad_data : min_val;
        min_val <= m;
        if (y_coordinate == y_upper_bound) begin
          y_coordinate <= '0;
          if (x_coordinate == x_upper_bound) begin
            busy         <= 1'b0;
            done         <= 1'b1;
            x_coordinate <= '0;
            threshold    <= (m == '1) ? 12'd0 : m;
          end else begin
            x_coordinate <= x_coordinate + 1'b1;
          end
        end else begin
          y_coordinate <= y_coordinate + 1'b1;
        end
      end
    end
  end

endmodule
