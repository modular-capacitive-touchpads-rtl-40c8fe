// bram_dualclock: dual-clock RAM used to carry data across the clock
// boundary between the touchpad controller (write side, 100 MHz) and user
// logic (read side, user clock). The write port writes on wclk; the read
// port returns the word at raddr one rclk later. A word is only read as a
// whole after it has been written, and each location is written in a
// single clock, so a reader sees either the old or the new value of a
// location, never a mix, as long as the read clock does not sample during
// the write of the same word (true of block RAMs with separate ports).
// Contents are cleared to zero at start-up ("no pad here").
module bram_dualclock #(
  parameter int unsigned LOGSIZE = 12,
  parameter int unsigned WIDTH   = 12
) (
  input  logic               wclk,
  input  logic               we,
  input  logic [LOGSIZE-1:0] waddr,
  input  logic [WIDTH-1:0]   din,
  input  logic               rclk,
  input  logic [LOGSIZE-1:0] raddr,
  output logic [WIDTH-1:0]   dout
);

  logic [WIDTH-1:0] mem [2**LOGSIZE];

  initial for (int i = 0; i < 2**LOGSIZE; i++) mem[i] = '0;

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= din;
  end

  always_ff @(posedge rclk) begin
    dout <= mem[raddr];
  end

endmodule
