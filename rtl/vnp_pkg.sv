// vnp_pkg: types and constants shared by the classifier-scheduler.
//
// The experimental packet is 32 bytes (256 bits) stored little endian: byte i
// of the packet sits in bits [8*i+7 : 8*i]. The first 20 bytes are an IPv4
// style header (time-to-live in byte 8), the remaining 12 bytes are payload.
// Packet size, header size, CAM depth and the four output ports follow the
// document's prototype. The port-table entry format (cast mode, port number,
// multicast mask) is this design's own choice: the document says only that the
// RAM gives the port and that the scheduler single-, multi- or broadcasts.
package vnp_pkg;

  localparam int PKT_BYTES = 32;
  localparam int PKT_BITS  = 8 * PKT_BYTES;
  localparam int TTL_BYTE  = 8;
  localparam int NPORTS    = 4;
  localparam int PORT_W    = $clog2(NPORTS);

  typedef logic [PKT_BITS-1:0] packet_t;

  // How a packet leaves the scheduler.
  typedef enum logic [1:0] {
    CAST_SINGLE = 2'd0,   // to port `port` only
    CAST_MULTI  = 2'd1,   // to every port set in `mask`
    CAST_BROAD  = 2'd2    // to all ports
  } cast_mode_e;

  // One entry of the port look-up RAM (8 bits).
  typedef struct packed {
    cast_mode_e          mode;
    logic [PORT_W-1:0]   port;
    logic [NPORTS-1:0]   mask;
  } port_entry_t;

  // One FIFO slot: the packet and where it goes.
  typedef struct packed {
    port_entry_t dest;
    packet_t     pkt;
  } sched_entry_t;

  // Hop update: the time-to-live byte is decremented (saturating at zero).
  function automatic packet_t hop_update(packet_t p);
    packet_t r = p;
    logic [7:0] ttl = p[8*TTL_BYTE +: 8];
    r[8*TTL_BYTE +: 8] = (ttl == 8'd0) ? 8'd0 : ttl - 8'd1;
    return r;
  endfunction

  // Ports a packet is sent to, from its table entry and the broadcast mode.
  function automatic logic [NPORTS-1:0] target_ports(port_entry_t e, logic bcast);
    logic [NPORTS-1:0] t;
    if (bcast || e.mode == CAST_BROAD) t = '1;
    else if (e.mode == CAST_MULTI)     t = e.mask;
    else                               t = NPORTS'(1) << e.port;
    return t;
  endfunction

endpackage
