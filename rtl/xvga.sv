// xvga: timing generator for a 1024 x 768, 60 Hz VGA picture from a
// 65 MHz pixel clock. hcount runs 0..1343 and vcount 0..805; pixels with
// hcount < 1024 and vcount < 768 are visible (blank low). Front porch, sync
// and back porch are 24/136/160 pixels and 3/6/29 lines; both syncs are
// active low. All outputs are registered and change together.
module xvga (
  input  logic        vga_clock,
  input  logic        reset,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);

  localparam int unsigned H_ACTIVE = 1024, H_FP = 24, H_SYNC = 136, H_TOTAL = 1344;
  localparam int unsigned V_ACTIVE = 768,  V_FP = 3,  V_SYNC = 6,   V_TOTAL = 806;

  logic [10:0] h_next;
  logic [9:0]  v_next;

  always_comb begin
    h_next = (hcount == 11'(H_TOTAL - 1)) ? 11'd0 : hcount + 1'b1;
    v_next = vcount;
    if (hcount == 11'(H_TOTAL - 1))
      v_next = (vcount == 10'(V_TOTAL - 1)) ? 10'd0 : vcount + 1'b1;
  end

  always_ff @(posedge vga_clock) begin
    if (reset) begin
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
    end else begin
      hcount <= h_next;
      vcount <= v_next;
      hsync  <= !(h_next >= 11'(H_ACTIVE + H_FP) && h_next < 11'(H_ACTIVE + H_FP + H_SYNC));
      vsync  <= !(v_next >= 10'(V_ACTIVE + V_FP) && v_next < 10'(V_ACTIVE + V_FP + V_SYNC));
      blank  <= (h_next >= 11'(H_ACTIVE)) || (v_next >= 10'(V_ACTIVE));
    end
  end

endmodule
