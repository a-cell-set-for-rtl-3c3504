// router_pkg: shared sizes of the packet router. A channel word is a
// four-bit field plus one tag bit that marks the last word of a packet.
// The first word of a packet is the relative address in the current
// dimension, the second the address in the other dimension.
package router_pkg;
  localparam int unsigned FIELD_W = 4;            // data / address field
  localparam int unsigned WORD_W  = FIELD_W + 1;  // field plus tag bit
  localparam int unsigned TAG_BIT = FIELD_W;      // index of the tag bit

  typedef logic [WORD_W-1:0] word_t;
endpackage
