// tp_pkg: shared types and constants of the modular capacitive touchpad
// controller.
//
// The controller talks to each sensor block's microcontroller with one-byte
// I2C messages. Internally, modules ask the I2C command layer for work with
// a 5-bit command code; the command layer turns the code into the byte sent
// on the bus. Block edges are numbered clockwise from the top (top=0,
// right=1, bottom=2, left=3); a block rotation r means the block has been
// turned r quarter turns clockwise. The byte values are the sensor block's
// command set; the 5-bit internal codes and the edge numbering are this
// design's conventions.
package tp_pkg;

  // Internal command codes (5 bits) understood by i2c_commands.
  typedef enum logic [4:0] {
    CMD_SCAN_ADDRESSES       = 5'b00000,
    CMD_NEIGHBOR_DETECT_HIGH = 5'b00001,
    CMD_NEIGHBOR_DETECT_LOW  = 5'b00010,
    CMD_SENSE_NEIGHBORS      = 5'b00011,
    CMD_SET_SENSE_RAILS_OFF  = 5'b10000,
    CMD_SET_SENSE_RAILS_ON   = 5'b10100
  } tp_cmd_e;

  // SET_MUX_OUTPUTS is 2'b11 followed by the 3-bit multiplexer select.
  localparam logic [1:0] CMD_MUX_PREFIX = 2'b11;

  function automatic logic [4:0] cmd_set_mux(input logic [2:0] sel);
    return {CMD_MUX_PREFIX, sel};
  endfunction

  // Bytes written to a sensor block microcontroller.
  localparam logic [7:0] PIC_ND_OFF      = 8'b0100_0000;
  localparam logic [7:0] PIC_ND_ON       = 8'b0110_0000;
  localparam logic [7:0] PIC_RAILS_ON    = 8'b0000_0011;
  localparam logic [7:0] PIC_RAILS_OFF   = 8'b0000_0000;
  localparam logic [1:0] PIC_MUX_PREFIX  = 2'b11;

  // Edge numbering, clockwise from the top.
  typedef enum logic [1:0] {
    EDGE_TOP    = 2'd0,
    EDGE_RIGHT  = 2'd1,
    EDGE_BOTTOM = 2'd2,
    EDGE_LEFT   = 2'd3
  } edge_e;

  // Bit of the SENSE_NEIGHBORS result {0000, left, top, right, bottom}
  // that belongs to an edge.
  function automatic int unsigned nd_bit(input logic [1:0] e);
    case (e)
      EDGE_LEFT:   return 3;
      EDGE_TOP:    return 2;
      EDGE_RIGHT:  return 1;
      default:     return 0;
    endcase
  endfunction

  // Width of the edge counts produced by the capacitance counters.
  localparam int unsigned SENSE_W = 12;

endpackage
