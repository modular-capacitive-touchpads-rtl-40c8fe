// tp_display: draws the state of the pad array on a VGA screen.
//
// Each pad coordinate is a square of 2^pad_size_log2 pixels, coordinate
// (0,0) in the top-left corner. For the pixel at (hcount, vcount) the module
// asks a touchpads read port for coordinate (hcount >> k, vcount >> k);
// the reading arrives two clocks later. The square is drawn green when the
// reading is below threshold (touched), grey when a pad is there but not
// touched, and black where there is no pad or outside the array. The first
// row and column of pixels in each square are left dark as a grid line.
//
// Timing: rgb, hs and vs are the input timing delayed by three clocks, so
// the picture stays aligned with the syncs.
//
// Showing the block layout and the pad states, with the pad size and
// threshold as inputs, follows the document; colours and the grid are this
// design's own.
module tp_display #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [10:0]  hcount,
  input  logic [9:0]   vcount,
  input  logic         hsync,
  input  logic         vsync,
  input  logic         blank,
  input  logic [2:0]   pad_size_log2,
  input  logic [11:0]  threshold,
  input  logic [N+1:0] x_upper_bound,
  input  logic [N+1:0] y_upper_bound,
  output logic [N+1:0] x_coordinate,
  output logic [N+1:0] y_coordinate,
  input  logic [11:0]  pad_data,
  output logic [11:0]  rgb,
  output logic         hs,
  output logic         vs
);

  logic [10:0] hx;
  logic [9:0]  vy;
  logic        in_array;

  assign hx = hcount >> pad_size_log2;
  assign vy = vcount >> pad_size_log2;
  assign in_array = (hx <= 11'(x_upper_bound)) && (vy <= 10'(y_upper_bound));
  assign x_coordinate = in_array ? hx[N+1:0] : '0;
  assign y_coordinate = in_array ? vy[N+1:0] : '0;

  // per-pixel attributes travelling with the two-clock read
  logic [1:0] d_hs, d_vs, d_show, d_grid;

  always_ff @(posedge clk) begin
    if (reset) begin
      d_hs <= '1; d_vs <= '1; d_show <= '0; d_grid <= '0;
      rgb <= '0; hs <= 1'b1; vs <= 1'b1;
    end else begin
      d_hs   <= {d_hs[0], hsync};
      d_vs   <= {d_vs[0], vsync};
      d_show <= {d_show[0], in_array && !blank};
      d_grid <= {d_grid[0], ((hcount & ((11'd1 << pad_size_log2) - 1'b1)) == 11'd0) ||
                            ((vcount & ((10'd1 << pad_size_log2) - 1'b1)) == 10'd0)};
      hs <= d_hs[1];
      vs <= d_vs[1];
      if (!d_show[1] || d_grid[1] || pad_data == 12'd0) rgb <= 12'h000;
      else if (pad_data < threshold)                     rgb <= 12'h0F0;
      else                                               rgb <= 12'h888;
    end
  end

endmodule
