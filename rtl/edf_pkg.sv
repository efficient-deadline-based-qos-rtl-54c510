// edf_pkg: types and helpers shared by the deadline-scheduled (EDF) network.
//
// A packet is carried through the network as a descriptor (pkt_t): its header
// fields plus its length in bytes. The payload itself is not stored; buffers,
// credits and link occupancy are all accounted in bytes from the length field,
// so scheduling and flow control behave as they would for the full packet.
//
// The `dl` field has two meanings. Inside a node (host interface or switch) it
// is an absolute deadline on that node's local clock. On a link it is the
// time-to-destination (TTD = deadline - local clock of the sender); the
// receiver turns it back into a local deadline by adding its own clock. Time is
// counted in clock cycles, and deadlines are compared modulo 2**TIME_W (serial
// number arithmetic), so free-running clocks may wrap.
//
// Design choices (not fixed by the source material): a 125 MHz clock moving
// 8 bytes per cycle per link gives the 8 Gbit/s link rate; field widths below
// are sized for 128 endpoints, 2 Kbyte packets and 8 Kbyte per virtual channel.
package edf_pkg;

  parameter int TIME_W          = 32;   // clock / deadline / TTD width (cycles)
  parameter int NODE_W          = 7;    // endpoint id, 128 endpoints
  parameter int ROUTE_W         = 4;    // up-link choice made at admission time
  parameter int LEN_W           = 12;   // packet length in bytes (MTU 2048)
  parameter int FLOW_W          = 8;    // flow id inside the source host
  parameter int SEQ_W           = 16;   // per-flow sequence number
  parameter int CRC_W           = 16;   // header CRC
  parameter int CRD_W           = 16;   // byte credit counters
  parameter int BYTES_PER_CYCLE = 8;    // link and crossbar width: 8 Gbit/s at 125 MHz
  parameter int VC_BYTES        = 8192; // buffer per virtual channel (8 Kbyte)
  parameter int MIN_PKT         = 128;  // smallest buffer charge per packet (bytes)

  typedef logic [TIME_W-1:0] time_t;

  // VC0 carries regulated (admitted) traffic, VC1 unregulated best-effort.
  typedef enum logic { VC_REG = 1'b0, VC_BE = 1'b1 } vc_e;

  typedef struct packed {
    time_t              dl;     // local deadline in a node, TTD on a link
    logic [NODE_W-1:0]  dest;
    logic [NODE_W-1:0]  src;
    logic [ROUTE_W-1:0] up_sel; // which upper-stage switch the fixed route uses
    vc_e                vc;
    logic [LEN_W-1:0]   len;
    logic [FLOW_W-1:0]  flow;
    logic [SEQ_W-1:0]   seq;
    logic [CRC_W-1:0]   crc;    // covers every field above
  } pkt_t;

  localparam int HDR_W = $bits(pkt_t) - CRC_W;

  // Forward half of a link: at most one packet header per cycle; the link is
  // then held busy for tx_cycles(len) cycles by the sender.
  typedef struct packed {
    logic valid;
    pkt_t pkt;
  } link_fwd_t;

  // Backward half of a link: credit return, in bytes, for one virtual channel.
  typedef struct packed {
    logic             valid;
    vc_e              vc;
    logic [LEN_W-1:0] bytes;
  } link_crd_t;

  // How a flow computes the deadline increment of each packet.
  typedef enum logic {
    DL_RATE  = 1'b0, // increment = length / reserved bandwidth
    DL_FRAME = 1'b1  // increment = frame latency / packets in the frame
  } dl_mode_e;

  typedef struct packed {
    dl_mode_e    mode;
    vc_e         vc;
    logic        smooth;    // use eligible time (deadline - eligibility factor)
    logic [15:0] inv_bw;    // cycles per byte, unsigned Q8.8 (1/BW_avg)
    time_t       frame_lat; // target latency per frame, cycles (DL_FRAME)
  } flow_cfg_t;

  // Application request: one network packet of a flow.
  typedef struct packed {
    logic [FLOW_W-1:0]  flow;
    logic [NODE_W-1:0]  dest;
    logic [ROUTE_W-1:0] up_sel;
    logic [LEN_W-1:0]   len;
    logic [15:0]        parts;  // packets in this frame (DL_FRAME flows)
  } app_req_t;

  // Switch activity counters (saturating at 2**16-1).
  typedef struct packed {
    logic [15:0] takeover_enq;  // packets steered into a take-over queue
    logic [15:0] takeover_win;  // take-over heads sent before the ordered head
    logic [15:0] be_bypass;     // VC1 packets sent while a VC0 head was blocked
    logic [15:0] credit_stall;  // link-free cycles an output waited for credits
    logic [15:0] crc_err;       // incoming headers with a bad CRC
  } sw_stats_t;

  // Host interface activity counters (saturating at 2**16-1).
  typedef struct packed {
    logic [15:0] inj_reg;       // regulated packets injected
    logic [15:0] inj_be;        // best-effort packets injected
    logic [15:0] elig_hold;     // cycles the eligible-time queue head waited
    logic [15:0] credit_stall;  // link-free cycles with packets but no credits
    logic [15:0] crc_err;       // received headers with a bad CRC
  } host_stats_t;

  // a is strictly earlier than b, modulo 2**TIME_W.
  function automatic logic dl_lt(time_t a, time_t b);
    time_t d;
    d = a - b;
    return d[TIME_W-1];
  endfunction

  // Cycles a packet occupies a link or a crossbar port.
  function automatic logic [LEN_W-1:0] tx_cycles(logic [LEN_W-1:0] len);
    logic [LEN_W:0] c;
    c = ({1'b0, len} + (LEN_W+1)'(BYTES_PER_CYCLE - 1)) / (LEN_W+1)'(BYTES_PER_CYCLE);
    if (c == '0) c = 1;
    return c[LEN_W-1:0];
  endfunction

  // Buffer space a packet occupies, and the credits it consumes: its length,
  // but at least MIN_PKT, so that DEPTH = VC_BYTES / MIN_PKT descriptor slots
  // can never run out before the byte credits do.
  function automatic logic [CRD_W-1:0] crd_bytes(logic [LEN_W-1:0] len);
    return (len < LEN_W'(MIN_PKT)) ? CRD_W'(MIN_PKT) : CRD_W'(len);
  endfunction

  function automatic logic [15:0] sat_add(logic [15:0] a, logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[16] ? 16'hFFFF : s[15:0];
  endfunction

endpackage
