// display_8hex: shows a 32-bit word as eight hexadecimal digits on a
// multiplexed seven-segment display (the board's status readout).
//
// A free-running counter of COUNT_BITS bits scans the digits: its top
// three bits select the digit, digit 7 (data[31:28], leftmost) first, so
// each digit is lit for 2^(COUNT_BITS-3) clocks in turn. Segments and digit
// strobes are active low, as on common-anode displays: seg[6:0] is
// {g, f, e, d, c, b, a}, and strobe[7] enables the leftmost digit.
// seg and strobe are registered and change together, one clock after the
// counter selects a new digit.
//
// The digit scan, the active-low outputs and the 14-bit default counter
// follow the document's display module; the decoder is a standard
// hexadecimal seven-segment font.
module display_8hex #(
  parameter int unsigned COUNT_BITS = 14
) (
  input  logic        clk,
  input  logic        reset,
  input  logic [31:0] data,
  output logic [6:0]  seg,
  output logic [7:0]  strobe
);

  logic [COUNT_BITS-1:0] counter;
  logic [2:0]            digit;     // 0 = leftmost
  logic [3:0]            nibble;
  logic [6:0]            lit;       // active-high segments {g..a}

  assign digit  = counter[COUNT_BITS-1 -: 3];
  assign nibble = data[31 - 4 * digit -: 4];

  always_comb begin
    unique case (nibble)
      4'h0: lit = 7'b011_1111;
      4'h1: lit = 7'b000_0110;
      4'h2: lit = 7'b101_1011;
      4'h3: lit = 7'b100_1111;
      4'h4: lit = 7'b110_0110;
      4'h5: lit = 7'b110_1101;
      4'h6: lit = 7'b111_1101;
      4'h7: lit = 7'b000_0111;
      4'h8: lit = 7'b111_1111;
      4'h9: lit = 7'b110_0111;
      4'hA: lit = 7'b111_0111;
      4'hB: lit = 7'b111_1100;
      4'hC: lit = 7'b011_1001;
      4'hD: lit = 7'b101_1110;
      4'hE: lit = 7'b111_1001;
      default: lit = 7'b111_0001;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      counter <= '0;
      seg     <= '1;
      strobe  <= '1;
    end else begin
      counter <= counter + 1'b1;
      seg     <= ~lit;
      strobe  <= ~(8'b1000_0000 >> digit);
    end
  end

endmodule
