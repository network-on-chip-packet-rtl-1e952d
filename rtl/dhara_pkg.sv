// dhara_pkg: types and constants shared by the slack-aware (DHARA) NoC.
//
// A flit is a 2-bit type tag plus a 32-bit data word. Packets are one HEAD
// flit followed by payload flits, the last of which is a TAIL. A packet that a
// router splits to let a more urgent packet pass is closed by an extra SPLIT
// flit, which carries no payload; the remainder of the packet is sent later
// behind a regenerated HEAD. The header carries the destination, the source,
// a packet priority (lower value = more important) and a 7-bit slack value.
// Slack 127 marks a packet whose timeliness is not tracked.
//
// Links carry, next to the flit, a dedicated priority-forwarding channel
// (pf_valid/pf_prio) that tells the downstream router the instantaneous
// priority of a packet stalled upstream behind the link.
//
// Fixed by the design described: 7-bit slack, 127 as "timeliness disabled",
// five ports, XY routing. Own choices: 32-bit data, 4-bit coordinates,
// 6-bit priority (enough for 42 flows), the header bit layout, port numbering.
package dhara_pkg;

  localparam int unsigned DATA_W  = 32;
  localparam int unsigned COORD_W = 4;
  localparam int unsigned PRIO_W  = 6;
  localparam int unsigned SLACK_W = 7;
  // Instantaneous priority: PRIO_W-bit priority plus up to a 7-bit slack term.
  localparam int unsigned PI_W    = 8;
  localparam logic [SLACK_W-1:0] SLACK_OFF = 7'd127;

  localparam int unsigned NPORTS = 5;
  localparam int unsigned PORT_W = 3;

  typedef enum logic [PORT_W-1:0] {
    P_EAST  = 3'd0,
    P_WEST  = 3'd1,
    P_NORTH = 3'd2,
    P_SOUTH = 3'd3,
    P_LOCAL = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    FT_HEAD  = 2'd0,
    FT_BODY  = 2'd1,
    FT_TAIL  = 2'd2,
    FT_SPLIT = 2'd3
  } flit_type_e;

  typedef struct packed {
    flit_type_e        ftype;
    logic [DATA_W-1:0] data;
  } flit_t;

  // Layout of the data word of a HEAD flit (32 bits).
  typedef struct packed {
    logic [2:0]         spare;
    logic [SLACK_W-1:0] slack;
    logic [PRIO_W-1:0]  prio;
    logic [COORD_W-1:0] src_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] dst_x;
  } header_t;

  // One direction of a router-to-router link.
  typedef struct packed {
    logic            valid;
    flit_t           flit;
    logic            pf_valid;
    logic [PI_W-1:0] pf_prio;
  } link_t;

  // Preset parameters of one periodic flow of a packet generator.
  typedef struct packed {
    logic               enable;
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [PRIO_W-1:0]  prio;
    logic [SLACK_W-1:0] slack;
    logic [7:0]         size;    // payload flits, last one is the TAIL (>= 1)
    logic [15:0]        period;  // release period in cycles (>= 1)
  } flow_cfg_t;

  // One step of slack decrement: stops at zero, never touches SLACK_OFF.
  function automatic logic [SLACK_W-1:0] slack_dec(logic [SLACK_W-1:0] s);
    if (s == SLACK_OFF || s == '0) return s;
    return s - 1'b1;
  endfunction

endpackage
