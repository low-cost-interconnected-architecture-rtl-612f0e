// lcia_pkg: constants and types shared by the LCIA router blocks.
//
// A spike packet is an opaque 36-bit word (the packet width of the
// reference router implementation). The only field the router itself ever
// looks at is the optional multicast mask, which this design places in the
// top MASK_W bits of the packet; the position of that field is this
// design's own choice. Input buffers hold five packets per channel, the
// buffer capacity chosen as the best trade-off between area, power and
// throughput.
package lcia_pkg;
  localparam int unsigned PKT_W      = 36;  // spike packet width in bits
  localparam int unsigned FIFO_DEPTH = 5;   // packets per input-channel FIFO
  localparam int unsigned N_CH       = 16;  // input channels per router (16 x 2 evaluation array)
  localparam int unsigned MASK_W     = 16;  // multicast mask field width (own choice)

  typedef logic [PKT_W-1:0] pkt_t;

  // Multicast filter: a packet is accepted when masking is off, or when its
  // mask field shares at least one set bit with the router's own mask.
  function automatic logic mask_match(input logic [MASK_W-1:0] pkt_mask,
                                      input logic [MASK_W-1:0] my_mask, input logic mask_en);
    return !mask_en || ((pkt_mask & my_mask) != '0);
  endfunction
endpackage
