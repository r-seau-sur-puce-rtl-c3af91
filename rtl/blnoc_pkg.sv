// blnoc_pkg: types and constants shared by the buffer-less network-on-chip.
//
// A packet is a header flit, zero or more body flits and a tail flit. The
// header carries the packet's label in the low bits of its data field; the
// routers look the label up in their switching tables to pick an output
// port. The tail marks the end of the packet and carries the last data word.
// Router ports are numbered in the order North, East, South, West and the
// local IP port, the five ports of a mesh router. The flit encodings and the
// numbering are this design's choice.
package blnoc_pkg;

  localparam int unsigned NUM_PORTS = 5;
  localparam int unsigned PORT_IW   = 3;

  typedef enum logic [PORT_IW-1:0] {
    PORT_N = 3'd0,
    PORT_E = 3'd1,
    PORT_S = 3'd2,
    PORT_W = 3'd3,
    PORT_L = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    FLIT_HEAD = 2'd0,
    FLIT_BODY = 2'd1,
    FLIT_TAIL = 2'd2
  } flit_type_e;

  // Index of the neighbour port facing a given port.
  function automatic port_e opposite(port_e p);
    case (p)
      PORT_N:  return PORT_S;
      PORT_S:  return PORT_N;
      PORT_E:  return PORT_W;
      PORT_W:  return PORT_E;
      default: return PORT_L;
    endcase
  endfunction

endpackage
