// qos_pkg: types and constants shared by the QoS-capable Hermes-style NoC.
//
// A flit is 16 bits wide. The first flit of every packet is the header:
//   [15:12] service, [11:9] unused, [8] P (priority, 0 = high, 1 = low),
//   [7:0] target address. The target address is split into X in [7:4] and
//   Y in [3:0]. The last flit of a packet is marked by the side-band eop bit.
// Every router has five directions (North, South, East, West, Local), each
// duplicated into two physical channels: channel 0 carries only high-priority
// packets and circuit-switched connections, channel 1 carries both classes.
// Physical port index = 2*direction + channel, which gives the ten ports of
// the 10x10 crossbar. The field layout, the flit width, the priority
// encoding and the channel rules follow the paper's packet and router
// description; the numeric service codes, the X/Y split of the target
// field and the port numbering are this design's own choices.
package qos_pkg;

  localparam int unsigned FLIT_W = 16;
  localparam int unsigned NDIR   = 5;
  localparam int unsigned NCH    = 2;
  localparam int unsigned NPORT  = NDIR * NCH;   // 10
  localparam int unsigned PORT_W = 4;            // enough to index 10 ports

  typedef enum logic [2:0] {
    DIR_NORTH = 3'd0,
    DIR_SOUTH = 3'd1,
    DIR_EAST  = 3'd2,
    DIR_WEST  = 3'd3,
    DIR_LOCAL = 3'd4
  } dir_e;

  // Service field codes (4 bits).
  typedef enum logic [3:0] {
    SRV_PACKET  = 4'h0,   // ordinary packet switching
    SRV_CONNECT = 4'h1,   // connection establishment packet
    SRV_RELEASE = 4'h2,   // connection release packet
    SRV_GT      = 4'h3    // data packet sent over an established connection
  } service_e;

  localparam logic PRIO_HIGH = 1'b0;
  localparam logic PRIO_LOW  = 1'b1;

  typedef struct packed {
    logic [3:0] service;
    logic [2:0] unused;
    logic       prio;
    logic [7:0] target;
  } header_t;

  // A flit with its end-of-packet side band.
  typedef struct packed {
    logic              eop;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // Forward half of one physical channel link; the backward half is a
  // single credit bit (receiver can accept a flit this cycle).
  typedef struct packed {
    logic  tx;
    flit_t flit;
  } link_t;

  function automatic logic [PORT_W-1:0] port_index(dir_e d, logic ch);
    return PORT_W'({d, ch});
  endfunction

endpackage
