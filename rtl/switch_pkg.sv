// Shared types and constants of the packet switch.
//
// A packet is a byte stream: destination address, source address, length
// of data (number of data bytes), the data bytes, and one frame check
// sequence (FCS) byte. The switch has one input port and four output
// ports; each output port owns an 8-bit port address held in a small
// configuration table. The field order, the byte widths and the port count
// follow the switch specification; the buffer depth is this design's own choice.
package switch_pkg;

  localparam int unsigned SW_PORTS    = 4;   // output ports
  localparam int unsigned BYTE_W      = 8;   // width of every packet field
  localparam int unsigned HDR_BYTES   = 3;   // destination, source, length
  localparam int unsigned FCS_BYTES   = 1;
  localparam int unsigned MAX_DATA    = 255; // largest value of the 8-bit length field
  localparam int unsigned MAX_PKT_BYTES = HDR_BYTES + MAX_DATA + FCS_BYTES; // 259
  localparam int unsigned SW_QUEUE_DEPTH = 1024; // bytes buffered per output port

  typedef logic [BYTE_W-1:0] byte_t;

  // Byte offsets of the header fields within a packet.
  typedef enum logic [1:0] {
    FIELD_DA  = 2'd0,
    FIELD_SA  = 2'd1,
    FIELD_LEN = 2'd2
  } hdr_field_e;

  // One byte on its way from the input port to an output queue.
  typedef struct packed {
    logic  first;  // destination-address byte of a packet
    logic  last;   // FCS (final) byte of a packet
    byte_t data;
  } pkt_byte_t;

endpackage
