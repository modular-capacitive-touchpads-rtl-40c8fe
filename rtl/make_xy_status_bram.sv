// make_xy_status_bram: rebuilds the XY status RAM that user logic reads.
//
// After a poll the sensor state RAM is ordered by {block, pad}. User logic
// wants it by pad coordinate, so on a start pulse this module visits every
// coordinate (x, y) with x in 0..x_upper_bound and y in 0..y_upper_bound
// (y fastest), asks coordinate_translation for the pad's state RAM address,
// reads the state RAM and writes the count to the XY status RAM at
// {x, y}. Where there is no pad the value written is 0.
//
// The work is a three-stage pipeline, one coordinate per clock:
//   stage 0  ct_x/ct_y presented to coordinate_translation
//   stage 1  ct_valid/ct_address back; state_raddr = ct_address
//   stage 2  state_dout back; written on the next clock (xy_we).
// done pulses for one clock together with the last write, so a map of
// (X+1)(Y+1) coordinates takes (X+1)(Y+1) + 4 clocks.
//
// The scan and the zero-for-no-pad rule follow the document; the pipeline
// is this design's own.
module make_xy_status_bram #(
  parameter int unsigned N = 4
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           start,
  output logic           done,
  output logic           busy,
  input  logic [N+1:0]   x_upper_bound,
  input  logic [N+1:0]   y_upper_bound,
  // coordinate translation lookup (one clock latency)
  output logic [N+1:0]   ct_x,
  output logic [N+1:0]   ct_y,
  input  logic           ct_valid,
  input  logic [N+3:0]   ct_address,
  // sensor state RAM read port (one clock latency)
  output logic [N+3:0]   state_raddr,
  input  logic [11:0]    state_dout,
  // XY status RAM write port
  output logic           xy_we,
  output logic [2*N+3:0] xy_addr,
  output logic [11:0]    xy_din
);

  logic [N+1:0]   x, y;
  logic           run, v1, v2, ok2;
  logic           last0, last1, last2;
  logic [2*N+3:0] a1, a2;

  assign ct_x        = x;
  assign ct_y        = y;
  assign state_raddr = ct_address;
  assign busy        = run | v1 | v2;

  always_ff @(posedge clk) begin
    if (reset) begin
      x <= '0; y <= '0; run <= 1'b0;
      v1 <= 1'b0; v2 <= 1'b0; ok2 <= 1'b0;
      last1 <= 1'b0; last2 <= 1'b0;
      a1 <= '0; a2 <= '0;
      xy_we <= 1'b0; xy_addr <= '0; xy_din <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      // stage 0: coordinate counter
      if (start && !busy) begin
        x <= '0; y <= '0; run <= 1'b1;
      end else if (run) begin
        if (y == y_upper_bound) begin
          y <= '0;
          if (x == x_upper_bound) run <= 1'b0;
          else x <= x + 1'b1;
        end else begin
          y <= y + 1'b1;
        end
      end
      // stage 1
      v1    <= run;
      a1    <= {x, y};
      last1 <= run && last0;
      // stage 2
      v2    <= v1;
      a2    <= a1;
      ok2   <= ct_valid;
      last2 <= last1;
      // write
      xy_we   <= v2;
      xy_addr <= a2;
      xy_din  <= ok2 ? state_dout : 12'd0;
      if (last2) done <= 1'b1;
    end
  end

  assign last0 = (x == x_upper_bound) && (y == y_upper_bound);

endmodule
