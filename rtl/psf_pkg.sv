// psf_pkg: types and constants shared by the high-radix virtual-channel router.
//
// A flit is 55 bits wide, the flit width used for the router's evaluation.
// The split of those 55 bits into fields is this design's own choice:
//   [54]    head    first flit of a packet, carries the routing information
//   [53]    tail    last flit of a packet (a one-flit packet has head and tail set)
//   [52:50] prio    packet priority level, 0 lowest, 7 highest (8 levels)
//   [49:42] dest    destination address, the index into the routing lookup table
//   [41:0]  payload
// The virtual channel a flit travels on is carried beside the flit on the link,
// not inside it.
package psf_pkg;

  localparam int FLIT_W    = 55;
  localparam int PRIO_W    = 3;
  localparam int PRIO_LVLS = 8;
  localparam int DEST_W    = 8;
  localparam int PAYLOAD_W = FLIT_W - 2 - PRIO_W - DEST_W;

  typedef struct packed {
    logic                 head;
    logic                 tail;
    logic [PRIO_W-1:0]    prio;
    logic [DEST_W-1:0]    dest;
    logic [PAYLOAD_W-1:0] payload;
  } flit_t;

  // Arbiter used inside the VC and switch allocators.
  typedef enum logic [1:0] {
    ARB_CL     = 2'd0,   // carry-lookahead, fixed priority (port 0 highest)
    ARB_MATRIX = 2'd1,   // matrix, least recently served
    ARB_RR     = 2'd2    // round robin
  } arb_kind_e;

  // Global state of an input virtual channel (the "G" field of an input unit).
  typedef enum logic [1:0] {
    VC_IDLE    = 2'd0,   // no packet; waits for a head flit at the buffer front
    VC_VALLOC  = 2'd1,   // route known, waiting for an output VC
    VC_ACTIVE  = 2'd2    // output VC held; flits compete for the switch
  } vc_state_e;

endpackage
