// edf_host_if: network interface of an end host. It stamps every packet with a
// deadline from its flow's parameters, orders packets by eligible time and by
// deadline, and injects them into the network under credit-based flow control.
//
// Flow table: NFLOWS entries written through the cfg_* port, each holding the
// deadline mode, VC, smoothing flag, 1/bandwidth and frame latency
// (flow_cfg_t), plus the flow's last deadline and next sequence number.
// An application request (one packet) is stamped by deadline_calc:
// deadline = max(last deadline, now) + increment, eligible time = deadline -
// ELIG_FACTOR for smoothed flows and "now" otherwise.
//
// Regulated traffic (VC0) passes through two sorted queues: first the
// eligible-time queue; as soon as its head is eligible (now >= eligible time)
// it moves, one packet per cycle, to the deadline queue. Best-effort traffic
// (VC1) goes to one queue sorted by deadline. When the link is idle the
// earliest-deadline regulated packet is sent if the VC0 credits cover it;
// otherwise the earliest best-effort packet is sent if the VC1 credits cover
// it, so best-effort only uses the link when no regulated packet is ready
// (packets still waiting for their eligible time do not block it).
// On the link the deadline is replaced by the time-to-destination
// TTD = deadline - local clock - 1 (the registered link cycle), and a new
// header CRC is attached.
//
// Receive side: packets from the network are delivered on rx_* the cycle
// after they arrive, with `dl` holding their remaining TTD at that cycle (negative when
// late) and rx_crc_ok the header check; their credits go straight back.
// Timing: req_ready is combinational (room in the target queue); out_link and
// in_crd are registered; a packet holds the link for tx_cycles(len) cycles.
// The local clock starts at `t_offset`. Queue depths, the one-move-per-cycle
// transfer and the meaning of "ready" for the best-effort gate are this
// design's choices.
module edf_host_if
  import edf_pkg::*;
#(
  parameter int NODE_ID     = 0,
  parameter int NFLOWS      = 16,
  parameter int QDEPTH      = 64,   // a 120 Kbyte frame is 60 packets of 2 Kbyte
  parameter int ELIG_FACTOR = 2500   // 20 us at 125 MHz
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  time_t                     t_offset,
  // flow table configuration
  input  logic                      cfg_we,
  input  logic [$clog2(NFLOWS)-1:0] cfg_flow,
  input  flow_cfg_t                 cfg,
  // application side
  input  logic                      req_valid,
  input  app_req_t                  req,
  output logic                      req_ready,
  // network side
  output link_fwd_t                 out_link,
  input  link_crd_t                 out_crd,
  input  link_fwd_t                 in_link,
  output link_crd_t                 in_crd,
  // delivered packets
  output logic                      rx_valid,
  output pkt_t                      rx_pkt,
  output logic                      rx_crc_ok,
  output host_stats_t               stats
);
  localparam int FW = $clog2(NFLOWS);

  // local clock: cycles since reset plus this node's own offset
  time_t t_local, t_count;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) t_count <= '0;
    else        t_count <= t_count + 1'b1;
  end
  assign t_local = t_count + t_offset;

  // ---------------- flow table ----------------
  flow_cfg_t        flow_cfg  [NFLOWS];
  time_t            flow_dl   [NFLOWS];
  logic             flow_v    [NFLOWS];
  logic [SEQ_W-1:0] flow_seq  [NFLOWS];

  logic [FW-1:0] f;
  flow_cfg_t     fc;
  time_t         new_dl, new_elig;
  pkt_t          new_pkt;
  logic          accept;

  assign f  = req.flow[FW-1:0];
  assign fc = flow_cfg[f];

  deadline_calc #(.ELIG_FACTOR(ELIG_FACTOR)) u_dl (
    .cfg(fc), .prev_valid(flow_v[f]), .prev_dl(flow_dl[f]), .t_now(t_local),
    .len(req.len), .parts(req.parts), .dl(new_dl), .elig(new_elig)
  );

  always_comb begin
    new_pkt        = '0;
    new_pkt.dl     = new_dl;
    new_pkt.dest   = req.dest;
    new_pkt.src    = NODE_W'(NODE_ID);
    new_pkt.up_sel = req.up_sel;
    new_pkt.vc     = fc.vc;
    new_pkt.len    = req.len;
    new_pkt.flow   = req.flow;
    new_pkt.seq    = flow_seq[f];
  end

  always_ff @(posedge clk) begin
    if (cfg_we) flow_cfg[cfg_flow] <= cfg;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NFLOWS; i++) begin
        flow_v[i]   <= 1'b0;
        flow_dl[i]  <= '0;
        flow_seq[i] <= '0;
      end
    end else if (accept) begin
      flow_v[f]   <= 1'b1;
      flow_dl[f]  <= new_dl;
      flow_seq[f] <= flow_seq[f] + 1'b1;
    end
  end

  // ---------------- queues ----------------
  logic  eq_push, eq_pop, eq_empty, eq_full;
  time_t eq_key;
  pkt_t  eq_head;
  logic  dq_push, dq_pop, dq_empty, dq_full;
  time_t dq_key_unused;
  pkt_t  dq_head;
  logic  bq_push, bq_pop, bq_empty, bq_full;
  time_t bq_key_unused;
  pkt_t  bq_head;
  logic  eligible;

  assign req_ready = (fc.vc == VC_REG) ? !eq_full : !bq_full;
  assign accept    = req_valid && req_ready;
  assign eq_push   = accept && (fc.vc == VC_REG);
  assign bq_push   = accept && (fc.vc == VC_BE);

  assign eligible = !eq_empty && !dl_lt(t_local, eq_key);
  assign eq_pop   = eligible && !dq_full;
  assign dq_push  = eq_pop;

  sorted_queue #(.DEPTH(QDEPTH)) u_elig_q (
    .clk, .rst_n, .push(eq_push), .push_key(new_elig), .push_pkt(new_pkt), .pop(eq_pop),
    .head_key(eq_key), .head_pkt(eq_head), .empty(eq_empty), .full(eq_full), .count()
  );

  sorted_queue #(.DEPTH(QDEPTH)) u_deadline_q (
    .clk, .rst_n, .push(dq_push), .push_key(eq_head.dl), .push_pkt(eq_head), .pop(dq_pop),
    .head_key(dq_key_unused), .head_pkt(dq_head), .empty(dq_empty), .full(dq_full), .count()
  );

  sorted_queue #(.DEPTH(QDEPTH)) u_be_q (
    .clk, .rst_n, .push(bq_push), .push_key(new_dl), .push_pkt(new_pkt), .pop(bq_pop),
    .head_key(bq_key_unused), .head_pkt(bq_head), .empty(bq_empty), .full(bq_full), .count()
  );

  // ---------------- injection ----------------
  logic [LEN_W-1:0] link_busy;
  logic [CRD_W-1:0] credits [2];
  logic             reg_ready, be_ready, send;
  pkt_t             tx_sel, tx_pkt;
  logic [CRC_W-1:0] tx_crc;
  logic             tx_ok_unused;

  assign reg_ready = (link_busy == '0) && !dq_empty && (credits[0] >= crd_bytes(dq_head.len));
  assign be_ready  = (link_busy == '0) && !bq_empty && (credits[1] >= crd_bytes(bq_head.len));
  assign dq_pop    = reg_ready;
  assign bq_pop    = !reg_ready && be_ready;
  assign send      = dq_pop || bq_pop;
  assign tx_sel    = dq_pop ? dq_head : bq_head;

  always_comb begin
    tx_pkt     = tx_sel;
    tx_pkt.dl  = tx_sel.dl - t_local - 1'b1;   // deadline -> TTD at arrival (1 link cycle)
    tx_pkt.crc = '0;
  end
  header_crc u_gen (.pkt(tx_pkt), .crc(tx_crc), .ok(tx_ok_unused));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_link   <= '0;
      link_busy  <= '0;
      credits[0] <= CRD_W'(VC_BYTES);
      credits[1] <= CRD_W'(VC_BYTES);
    end else begin
      out_link.valid   <= send;
      out_link.pkt     <= tx_pkt;
      out_link.pkt.crc <= tx_crc;
      if (send)                link_busy <= tx_cycles(tx_sel.len) - 1'b1;
      else if (link_busy != 0) link_busy <= link_busy - 1'b1;
      for (int v = 0; v < 2; v++)
        credits[v] <= credits[v]
          - ((send && tx_sel.vc == vc_e'(v)) ? crd_bytes(tx_sel.len) : '0)
          + ((out_crd.valid && out_crd.vc == vc_e'(v)) ? CRD_W'(out_crd.bytes) : '0);
    end
  end

  // ---------------- receive ----------------
  logic rx_ok_c;
  header_crc u_chk (.pkt(in_link.pkt), .crc(), .ok(rx_ok_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_valid  <= 1'b0;
      rx_pkt    <= '0;
      rx_crc_ok <= 1'b0;
      in_crd    <= '0;
    end else begin
      rx_valid     <= in_link.valid;
      rx_pkt       <= in_link.pkt;
      rx_pkt.dl    <= in_link.pkt.dl - 1'b1;   // one more cycle in the rx register
      rx_crc_ok    <= rx_ok_c;
      in_crd.valid <= in_link.valid;
      in_crd.vc    <= in_link.pkt.vc;
      in_crd.bytes <= LEN_W'(crd_bytes(in_link.pkt.len));
    end
  end

  // ---------------- counters ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stats <= '0;
    else begin
      stats.inj_reg      <= sat_add(stats.inj_reg, 16'(dq_pop));
      stats.inj_be       <= sat_add(stats.inj_be, 16'(bq_pop));
      stats.elig_hold    <= sat_add(stats.elig_hold, 16'(!eq_empty && !eligible));
      stats.credit_stall <= sat_add(stats.credit_stall,
                              16'(link_busy == '0 && !send && (!dq_empty || !bq_empty)));
      stats.crc_err      <= sat_add(stats.crc_err, 16'(in_link.valid && !rx_ok_c));
    end
  end

  a_flow_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                                    req_valid |-> (int'(req.flow) < NFLOWS));
endmodule
