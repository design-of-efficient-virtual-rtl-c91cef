// noc_pkg: constants and types shared by the virtual-channel router.
//
// The router has five ports (East, West, North, South, Local), 16-bit flits
// and a 3-bit destination code held in the three least significant bits of
// a head flit: code 3'b001 selects output port 1, 3'b010 port 2, and so on up
// to 3'b101 for port 5. Those numbers follow the router's description. The
// number of virtual channels (4, from a 2-bit channel select), the buffer
// depth (4 flits) and the 2-bit flit type are this design's own choices.
package noc_pkg;

  parameter int unsigned NUM_PORTS = 5;   // router ports
  parameter int unsigned FLIT_W    = 16;  // flit / message width
  parameter int unsigned DEST_W    = 3;   // destination code width (flit[2:0])
  parameter int unsigned NUM_VCS   = 4;   // virtual channels per port
  parameter int unsigned BUF_DEPTH = 4;   // flits per virtual-channel FIFO

  // Flit type travels beside the flit. Bit 1 marks a head flit, bit 0 a
  // tail flit; a single-flit packet is both.
  typedef enum logic [1:0] {
    FT_BODY   = 2'b00,
    FT_TAIL   = 2'b01,
    FT_HEAD   = 2'b10,
    FT_SINGLE = 2'b11
  } flit_type_e;

  function automatic logic is_head(input logic [1:0] t);
    return t[1];
  endfunction

  function automatic logic is_tail(input logic [1:0] t);
    return t[0];
  endfunction

endpackage
