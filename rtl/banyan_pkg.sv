// banyan_pkg: types shared by the banyan connection network, the memory
// agents and the processor interfaces.
//
// A packet carries one message. Besides the request kind (RSVP or STING)
// and the routing address that the switches rewrite hop by hop, it holds a
// payload of a cell index and a data word. The address field is ADDR_MAX
// bits wide; a network of STAGES stages uses only its low STAGES bits and
// keeps the rest zero. The payload widths and ADDR_MAX are this design's
// choice: the source model only says packets are "dozens of bits" long.
//
// Every port between two agents holds three latches (Outgoing, Incoming and
// New). The agent below a port (processor side) loads its Outgoing latch and
// empties its Incoming and New latches; the agent above it (memory side)
// empties Outgoing and loads Incoming and New. The two control bundles
// below_ctl_t and above_ctl_t carry exactly those commands.
package banyan_pkg;

  localparam int unsigned ADDR_MAX = 8;   // largest network: 2**ADDR_MAX processors
  localparam int unsigned CELL_W   = 8;   // cell index inside one memory
  localparam int unsigned DATA_W   = 16;  // contents of one cell

  typedef logic [ADDR_MAX-1:0] addr_t;

  typedef struct packed {
    logic                rsvp;  // 1: RSVP (fetch) or its answer, 0: STING or NEW
    addr_t               addr;  // destination (outgoing) / return path (incoming, new)
    logic [CELL_W-1:0]   cidx;  // cell index in the addressed memory
    logic [DATA_W-1:0]   data;  // STING value or RSVP answer
  } pkt_t;

  // Contents of one port as seen by both neighbouring agents.
  typedef struct packed {
    logic o_v;  pkt_t o;   // Outgoing latch (processor -> memory)
    logic i_v;  pkt_t i;   // Incoming latch (memory -> processor)
    logic n_v;  pkt_t n;   // New latch      (NEW-sink, memory -> processor)
  } port_state_t;

  // Commands from the agent below a port.
  typedef struct packed {
    logic o_load;  pkt_t o_din;
    logic i_take;
    logic n_take;
  } below_ctl_t;

  // Commands from the agent above a port.
  typedef struct packed {
    logic o_take;
    logic i_load;  pkt_t i_din;
    logic n_load;  pkt_t n_din;
  } above_ctl_t;

  // Choice a switch makes for one of its outputs on one plane.
  typedef enum logic [1:0] {
    XFR_NONE  = 2'd0,   // no transfer
    XFR_BAR   = 2'd1,   // straight across
    XFR_CROSS = 2'd2    // diagonal
  } xfr_e;

  // Requests a processor makes of the store.
  typedef enum logic [1:0] {
    OP_NEW   = 2'd0,   // allocate a cell (CONS)
    OP_STING = 2'd1,   // store into a cell (RPLACA/RPLACD)
    OP_RSVP  = 2'd2    // fetch a cell (CAR/CDR)
  } op_e;

  // What a processor interface did in a cycle (for utilisation counts).
  typedef enum logic [1:0] {
    PS_IDLE    = 2'd0,  // no request from the processor
    PS_ACTIVE  = 2'd1,  // a packet was issued or absorbed
    PS_WAITING = 2'd2,  // waiting for an RSVP answer or a NEW cell
    PS_BLOCKED = 2'd3   // Outgoing latch still full
  } pstat_e;

endpackage
