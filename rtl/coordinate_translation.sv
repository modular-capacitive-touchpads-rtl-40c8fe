// coordinate_translation: turns the XY coordinate of a pad into the address
// of its reading in the sensor state RAM, {internal block address, pad}.
//
// Every block covers 4 x 4 pad coordinates. The upper bits of a pad
// coordinate select a block-grid gcell; the gcell holds {valid, rotation,
// internal address} as written by the mapping module. The lower two bits of
// x and y select the pad within the block; because a block may be mounted
// in any of four orientations, they are first turned back by the block's
// rotation into block-local column u and row v (row 3 at the block's top
// edge), and the pad number is {3-v, u}: pads 0-7 (first sense rail) fill
// the upper two rows, pads 8-15 (second rail) the lower two.
//
// XY_QUADRANT sets where the user's origin is: 1 bottom-left with y up (the
// native orientation), 2 bottom-right, 3 top-right, 4 top-left with y down
// (as on a VGA screen).
//
// The grid is double buffered: the mapping module writes the back frame
// while users read the front one, and set_output swaps them and loads the
// new bounds, so users never see a half-built map. Bounds are reported in
// pad coordinates, (blocks + 1) * 4 - 1.
//
// Timing: valid and address follow x_coordinate/y_coordinate by one clock.
// The frame buffer, the quadrant option and the {valid, rotation, address}
// format follow the document; the pad numbering of rotated blocks is
// computed here from the unrotated layout instead of a stored table.
module coordinate_translation #(
  parameter int unsigned N           = 4,
  parameter int unsigned XY_QUADRANT = 4
) (
  input  logic         clk,
  input  logic         reset,
  // mapping module side
  input  logic         set_output,
  input  logic         write_enable,
  input  logic [N-1:0] x_address,
  input  logic [N-1:0] y_address,
  input  logic [N+2:0] data_in,          // {valid, rotation[1:0], address[N-1:0]}
  input  logic [N-1:0] max_x_bound_in,   // last block column in use
  input  logic [N-1:0] max_y_bound_in,   // last block row in use
  // user side
  input  logic [N+1:0] x_coordinate,
  input  logic [N+1:0] y_coordinate,
  output logic [N+1:0] max_x_bound_out,
  output logic [N+1:0] max_y_bound_out,
  output logic         valid,
  output logic [N+3:0] address
);

  logic [N+2:0] frame0 [2**(2*N)];
  logic [N+2:0] frame1 [2**(2*N)];
  logic         front;               // frame currently read by users

  initial for (int i = 0; i < 2**(2*N); i++) begin
    frame0[i] = '0;
    frame1[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      front           <= 1'b0;
      max_x_bound_out <= '0;
      max_y_bound_out <= '0;
    end else if (set_output) begin
      front           <= ~front;
      max_x_bound_out <= {max_x_bound_in, 2'b11};
      max_y_bound_out <= {max_y_bound_in, 2'b11};
    end
  end

  // back frame write port
  always_ff @(posedge clk) begin
    if (write_enable) begin
      if (front) frame0[{x_address, y_address}] <= data_in;
      else       frame1[{x_address, y_address}] <= data_in;
    end
  end

  // user coordinates to native (origin bottom-left, y up)
  logic [N+1:0] xq, yq;
  always_comb begin
    xq = x_coordinate;
    yq = y_coordinate;
    if (XY_QUADRANT == 2 || XY_QUADRANT == 3) xq = max_x_bound_out - x_coordinate;
    if (XY_QUADRANT == 3 || XY_QUADRANT == 4) yq = max_y_bound_out - y_coordinate;
  end

  logic [N+2:0] gcell;
  logic [1:0]   lo_x, lo_y;
  logic         in_bounds;

  always_ff @(posedge clk) begin
    gcell      <= front ? frame1[{xq[N+1:2], yq[N+1:2]}] : frame0[{xq[N+1:2], yq[N+1:2]}];
    lo_x      <= xq[1:0];
    lo_y      <= yq[1:0];
    in_bounds <= (x_coordinate <= max_x_bound_out) && (y_coordinate <= max_y_bound_out);
  end

  // undo the block's clockwise rotation: each step maps (x, y) -> (3-y, x)
  logic [1:0] u, v;
  always_comb begin
    unique case (gcell[N+1:N])
      2'd0: begin u = lo_x;  v = lo_y;  end
      2'd1: begin u = ~lo_y; v = lo_x;  end
      2'd2: begin u = ~lo_x; v = ~lo_y; end
      default: begin u = lo_y; v = ~lo_x; end
    endcase
  end

  assign valid   = gcell[N+2] && in_bounds;
  assign address = {gcell[N-1:0], ~v, u};

endmodule
