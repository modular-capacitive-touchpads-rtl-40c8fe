// bram_sdp: single-clock simple dual-port RAM (one write port, one read
// port), used as the sensor state RAM that the polling module fills and the
// XY status builder reads. Reads are synchronous: dout shows the word at
// raddr one clock after raddr is presented; a read of the word being
// written returns the old value. Contents are cleared to zero at start-up
// so that unread pads read as "no data". Size and width are parameters.
module bram_sdp #(
  parameter int unsigned LOGSIZE = 8,
  parameter int unsigned WIDTH   = 12
) (
  input  logic               clk,
  input  logic               we,
  input  logic [LOGSIZE-1:0] waddr,
  input  logic [WIDTH-1:0]   din,
  input  logic [LOGSIZE-1:0] raddr,
  output logic [WIDTH-1:0]   dout
);

  logic [WIDTH-1:0] mem [2**LOGSIZE];

  initial for (int i = 0; i < 2**LOGSIZE; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= din;
    dout <= mem[raddr];
  end

endmodule
