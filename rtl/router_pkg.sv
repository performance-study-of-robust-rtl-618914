// router_pkg: types and constants shared by the router blocks.
//
// A packet on the router's 8-bit input is, in order: the destination
// address byte (DA), the length byte (number of data bytes), the data
// bytes and one frame check byte. The frame check byte is the XOR of every
// byte before it (DA, length and data); that choice of check is this
// design's own, the packet layout follows the source description.
package router_pkg;

  localparam int unsigned BYTE_W = 8;
  typedef logic [BYTE_W-1:0] byte_t;

  // Output port k answers to DA = ADDR_BASE + k (port 0 is 8'hF8, port 1
  // is 8'hF9, as in the reference simulation; later ports continue the
  // pattern).
  localparam byte_t DEFAULT_ADDR_BASE = 8'hF8;

  // Largest number of data bytes a packet may carry.
  localparam int unsigned DEFAULT_MAX_LEN = 62;

  // Controller state: which field of the packet the next input byte is.
  typedef enum logic [1:0] {
    ST_DA   = 2'd0,   // waiting for the destination address byte
    ST_LEN  = 2'd1,   // next byte is the length
    ST_DATA = 2'd2,   // next byte is a data byte
    ST_FCS  = 2'd3    // next byte is the frame check byte
  } rx_state_t;

endpackage
