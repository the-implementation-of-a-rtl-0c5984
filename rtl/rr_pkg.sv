// rr_pkg: shared sizes, flit layout and link framing of the router.
//
// A flit is 77 bits while it sits in an input queue. On its way through the
// crossbar three bits (the virtual channel it will use on the next link) are
// appended, giving an 80-bit word that travels as two 40-bit halves in the
// two 100 MHz cycles of one 50 MHz flit cycle. On a network link the same 80
// bits travel as four 20-bit beats, one per clock edge, each beat widened to
// 24 bits by one parity bit and three control bits.
//
// The sizes (6 ports, 5 virtual channels, 16-flit queues, 77/40/24-bit
// buses) follow the router's description. The placement of fields inside a
// flit, the control-bit framing of a link beat and the mesh coordinate width
// are this design's own choices.
package rr_pkg;

  localparam int unsigned NPORTS    = 6;   // 4 network, processor, diagnostic
  localparam int unsigned NNET      = 4;   // network ports 0..3
  localparam int unsigned NVC       = 5;   // virtual channels per port
  localparam int unsigned QDEPTH    = 16;  // flits per virtual-channel queue
  localparam int unsigned FLIT_W    = 77;  // queue word
  localparam int unsigned VC_W      = 3;   // virtual channel number
  localparam int unsigned PORT_W    = 3;   // port number
  localparam int unsigned WORD_W    = FLIT_W + VC_W;  // 80, munged flit
  localparam int unsigned XB_W      = 40;  // crossbar bus
  localparam int unsigned BEAT_D    = 20;  // data bits per link beat
  localparam int unsigned LINK_W    = 24;  // link wires
  localparam int unsigned COORD_W   = 4;   // mesh coordinate width
  localparam int unsigned LOCAL_SLOTS = 4; // buffer of the processor and diagnostic outputs

  // Port numbering, inputs and outputs alike.
  localparam logic [PORT_W-1:0] P_XPOS = 3'd0;
  localparam logic [PORT_W-1:0] P_XNEG = 3'd1;
  localparam logic [PORT_W-1:0] P_YPOS = 3'd2;
  localparam logic [PORT_W-1:0] P_YNEG = 3'd3;
  localparam logic [PORT_W-1:0] P_PROC = 3'd4;
  localparam logic [PORT_W-1:0] P_DIAG = 3'd5;

  // Flit layout (77 bits).
  //   [76]    head: first flit of a packet, carries the destination
  //   [75]    tail: last flit of a packet (head and tail both set: one-flit packet)
  //   [74:0]  payload; in a head flit:
  //             [7:4] destination y, [3:0] destination x,
  //             [8]   deliver to the diagnostic port instead of the processor
  typedef struct packed {
    logic               head;
    logic               tail;
    logic [65:0]        body;
    logic               to_diag;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] dst_x;
  } flit_t;

  // A routing decision: output port and the virtual channel on it.
  typedef struct packed {
    logic              valid;
    logic [PORT_W-1:0] port;
    logic [VC_W-1:0]   vc;
  } route_t;

  // A bid from an input to the arbiter for one flit.
  typedef struct packed {
    logic              valid;
    logic [PORT_W-1:0] port;
    logic [VC_W-1:0]   vc;
    logic              head;
    logic              tail;
  } bid_t;

endpackage
