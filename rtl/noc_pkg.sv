// noc_pkg: constants and packet helpers shared by the shared-queue router.
//
// A packet is one 8-bit word that carries all three flits side by side:
//   [7:6] head flit : output port the packet asks for
//   [5:2] body flit : payload
//   [1:0] tail flit : input port the packet came from
// The field widths (2/4/2) and their order follow the published packet format;
// the exact bit positions are this design's reading of it. The packed struct
// keeps the layout in one place so a different layout only changes this file.
package noc_pkg;

  localparam int unsigned PORT_W  = 2;  // width of a port number (4 ports); a packet is 2+4+2 = 8 bits
  localparam int unsigned BODY_W  = 4;  // payload width

  typedef logic [PORT_W-1:0] port_t;
  typedef logic [BODY_W-1:0] body_t;

  // One packet = head, body and tail flit in a single word.
  typedef struct packed {
    port_t dest;  // head flit: requested output port
    body_t body;  // body flit: payload
    port_t src;   // tail flit: input port it entered by
  } pkt_t;

endpackage
