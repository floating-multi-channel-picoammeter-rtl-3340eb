// pam_pkg: types and constants shared by the picoammeter receiver.
//
// A measurement node sends each reading as 16-bit serial frames. The frame
// layout below follows the published frame format bit for bit: bit 15 is a
// start bit that is always 1, bits 14..9 a 6-bit address, bits 8..1 a data
// byte and bit 0 a stop bit that is always 0. Two addresses together carry
// one 16-bit current value. Which two addresses these are, and which of them
// carries the upper byte, is not published; the values here are this
// design's own choice. The packet start word is likewise this design's own
// value: only its 16-bit width is published.
package pam_pkg;

  // One serial frame from a measurement node, MSB (start bit) sent first.
  typedef struct packed {
    logic       start;  // bit 15, always 1
    logic [5:0] addr;   // bits 14..9
    logic [7:0] data;   // bits 8..1
    logic       stop;   // bit 0, always 0
  } node_frame_t;

  localparam int unsigned FRAME_BITS = $bits(node_frame_t);  // 16

  localparam logic START_BIT_VALUE = 1'b1;
  localparam logic STOP_BIT_VALUE  = 1'b0;

  // Addresses of the two frames that make up one current value. The frame
  // with CUR_ADDR_MSB is sent first and holds bits 15..8; the frame with
  // CUR_ADDR_LSB follows and holds bits 7..0 and completes the value.
  localparam logic [5:0] CUR_ADDR_MSB = 6'd0;
  localparam logic [5:0] CUR_ADDR_LSB = 6'd1;

  // First word of every packet sent to the host.
  localparam logic [15:0] PACKET_START_WORD = 16'hA55A;

endpackage
