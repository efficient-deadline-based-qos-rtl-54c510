// edf_switch: combined input/output buffered switch that schedules on packet
// deadlines carried in the header, with no per-flow state.
//
// Every input and every output port has an edf_port_buffer (regulated VC0 with
// ordered + take-over queues, best-effort VC1 common queue). Packets arrive
// with a time-to-destination (TTD); the input stage checks the header CRC and
// rebuilds a local deadline, deadline = TTD + local clock. A crossbar moves a
// packet from an input buffer to an output buffer: for each output, among the
// inputs whose offered packet is routed there, a VC0 packet beats a VC1 packet
// and then the earliest deadline wins (lowest port index on a tie). Since each
// input queue is close to deadline order, looking at queue heads only is
// enough to merge them in deadline order. An input offers its VC0 head only if
// that head's output port is free and has room in its VC0 buffer; otherwise it
// may offer its VC1 head. The output stage sends, whenever the link is idle,
// the VC0 head if the downstream VC0 credits cover it, else the VC1 head if
// its credits cover it; on the way out the deadline becomes a TTD again
// (TTD = deadline - local clock - 1, the 1 being the registered link cycle,
// so the TTD is exact on arrival) and the CRC is regenerated.
//
// Routing is fixed and read from the header, for a two-stage folded network:
// a leaf switch (IS_SPINE = 0, id SW_ID) sends a packet for one of its own
// HPL hosts down to port dest % HPL and any other packet up to port
// HPL + up_sel; a spine switch sends it down to port dest / HPL.
//
// Timing: links and credit returns are registered. A packet holds its link, its
// crossbar input and its crossbar output for tx_cycles(len) cycles (8 bytes
// per cycle, no crossbar speed-up). Credits are in bytes (crd_bytes) per VC,
// returned upstream when a packet leaves an input buffer. Input buffers use
// one FIFO set per input port rather than virtual output queues, which this
// design leaves out. The local clock starts at `t_offset`, so switches need not
// be synchronised with the hosts or with each other.
module edf_switch
  import edf_pkg::*;
#(
  parameter int NPORTS   = 16,
  parameter bit IS_SPINE = 1'b0,
  parameter int SW_ID    = 0,
  parameter int HPL      = 8,     // hosts per leaf switch
  parameter int DEPTH    = VC_BYTES / MIN_PKT
) (
  input  logic      clk,
  input  logic      rst_n,
  input  time_t     t_offset,
  input  link_fwd_t in_link  [NPORTS],
  output link_crd_t in_crd   [NPORTS],
  output link_fwd_t out_link [NPORTS],
  input  link_crd_t out_crd  [NPORTS],
  output sw_stats_t stats
);
  localparam int PW = (NPORTS > 1) ? $clog2(NPORTS) : 1;

  function automatic logic [PW-1:0] route(pkt_t p);
    int d;
    d = int'(p.dest);
    if (IS_SPINE)              return PW'(d / HPL);
    else if (d / HPL == SW_ID) return PW'(d % HPL);
    else                       return PW'(HPL + int'(p.up_sel));
  endfunction

  // local clock: cycles since reset plus this node's own offset
  time_t t_local, t_count;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) t_count <= '0;
    else        t_count <= t_count + 1'b1;
  end
  assign t_local = t_count + t_offset;

  // ---------------- input side ----------------
  logic             ipush      [NPORTS];
  pkt_t             idin       [NPORTS];
  logic             icrc_ok    [NPORTS];
  logic [1:0]       ivc_ready  [NPORTS];
  logic [1:0]       ihead_v    [NPORTS];
  pkt_t             ihead      [NPORTS][2];
  logic             isel_v     [NPORTS];
  pkt_t             isel       [NPORTS];
  vc_e              isel_vc    [NPORTS];
  logic             ipop       [NPORTS];
  logic [CRD_W-1:0] ibytes     [NPORTS][2];
  logic             i_to_enq   [NPORTS];
  logic             i_to_win   [NPORTS];
  logic [LEN_W-1:0] in_busy    [NPORTS];

  // ---------------- output side ----------------
  logic             opush      [NPORTS];
  pkt_t             odin       [NPORTS];
  logic [1:0]       ovc_ready  [NPORTS];
  logic [1:0]       ohead_v    [NPORTS];
  pkt_t             ohead      [NPORTS][2];
  logic             osel_v     [NPORTS];
  pkt_t             osel       [NPORTS];
  vc_e              osel_vc    [NPORTS];
  logic [CRD_W-1:0] obytes     [NPORTS][2];
  logic             o_to_enq   [NPORTS];
  logic             o_to_win   [NPORTS];
  logic [LEN_W-1:0] xout_busy  [NPORTS];
  logic [LEN_W-1:0] link_busy  [NPORTS];
  logic [CRD_W-1:0] credits    [NPORTS][2];
  pkt_t             tx_pkt     [NPORTS];
  logic [CRC_W-1:0] tx_crc     [NPORTS];
  logic             tx_crc_ok_unused [NPORTS];

  // crossbar grants
  logic             gvalid     [NPORTS];
  logic [PW-1:0]    gidx       [NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    header_crc u_chk (.pkt(in_link[i].pkt), .crc(), .ok(icrc_ok[i]));

    always_comb begin
      idin[i]    = in_link[i].pkt;
      idin[i].dl = in_link[i].pkt.dl + t_local;   // TTD -> local deadline
      ipush[i]   = in_link[i].valid;
    end

    always_comb begin
      for (int v = 0; v < 2; v++) begin
        logic [PW-1:0] o;
        o = route(ihead[i][v]);
        ivc_ready[i][v] = ihead_v[i][v] && (in_busy[i] == '0) && (xout_busy[o] == '0)
                       && (CRD_W'(VC_BYTES) - obytes[o][v] >= crd_bytes(ihead[i][v].len));
      end
    end

    edf_port_buffer #(.DEPTH(DEPTH)) u_ibuf (
      .clk, .rst_n, .push(ipush[i]), .din(idin[i]), .vc_ready(ivc_ready[i]),
      .head_valid(ihead_v[i]), .head_pkt(ihead[i]), .sel_valid(isel_v[i]), .sel_pkt(isel[i]),
      .sel_vc(isel_vc[i]), .pop(ipop[i]), .bytes_used(ibytes[i]),
      .ev_takeover_enq(i_to_enq[i]), .ev_takeover_win(i_to_win[i])
    );

    always_comb begin
      ipop[i] = 1'b0;
      for (int o = 0; o < NPORTS; o++)
        if (gvalid[o] && gidx[o] == PW'(i)) ipop[i] = 1'b1;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        in_crd[i]  <= '0;
        in_busy[i] <= '0;
      end else begin
        in_crd[i].valid <= ipop[i];
        in_crd[i].vc    <= isel_vc[i];
        in_crd[i].bytes <= LEN_W'(crd_bytes(isel[i].len));
        if (ipop[i])             in_busy[i] <= tx_cycles(isel[i].len) - 1'b1;
        else if (in_busy[i] != 0) in_busy[i] <= in_busy[i] - 1'b1;
      end
    end
  end

  // ---------------- crossbar arbitration ----------------
  for (genvar o = 0; o < NPORTS; o++) begin : g_xbar
    always_comb begin
      logic found;
      pkt_t best;
      found = 1'b0;
      best  = '0;
      gidx[o] = '0;
      for (int i = 0; i < NPORTS; i++) begin
        if (isel_v[i] && route(isel[i]) == PW'(o)) begin
          if (!found
              || (isel[i].vc == VC_REG && best.vc == VC_BE)
              || (isel[i].vc == best.vc && dl_lt(isel[i].dl, best.dl))) begin
            found   = 1'b1;
            best    = isel[i];
            gidx[o] = PW'(i);
          end
        end
      end
      gvalid[o] = found;
      opush[o]  = found;
      odin[o]   = best;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                xout_busy[o] <= '0;
      else if (gvalid[o])        xout_busy[o] <= tx_cycles(odin[o].len) - 1'b1;
      else if (xout_busy[o] != 0) xout_busy[o] <= xout_busy[o] - 1'b1;
    end
  end

  // ---------------- output side ----------------
  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    always_comb begin
      for (int v = 0; v < 2; v++)
        ovc_ready[o][v] = ohead_v[o][v] && (link_busy[o] == '0)
                       && (credits[o][v] >= crd_bytes(ohead[o][v].len));
    end

    edf_port_buffer #(.DEPTH(DEPTH)) u_obuf (
      .clk, .rst_n, .push(opush[o]), .din(odin[o]), .vc_ready(ovc_ready[o]),
      .head_valid(ohead_v[o]), .head_pkt(ohead[o]), .sel_valid(osel_v[o]), .sel_pkt(osel[o]),
      .sel_vc(osel_vc[o]), .pop(osel_v[o]), .bytes_used(obytes[o]),
      .ev_takeover_enq(o_to_enq[o]), .ev_takeover_win(o_to_win[o])
    );

    always_comb begin
      tx_pkt[o]     = osel[o];
      tx_pkt[o].dl  = osel[o].dl - t_local - 1'b1;  // local deadline -> TTD at arrival
      tx_pkt[o].crc = '0;
    end
    header_crc u_gen (.pkt(tx_pkt[o]), .crc(tx_crc[o]), .ok(tx_crc_ok_unused[o]));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_link[o]     <= '0;
        link_busy[o]    <= '0;
        credits[o][0]   <= CRD_W'(VC_BYTES);
        credits[o][1]   <= CRD_W'(VC_BYTES);
      end else begin
        out_link[o].valid <= osel_v[o];
        out_link[o].pkt   <= tx_pkt[o];
        out_link[o].pkt.crc <= tx_crc[o];
        if (osel_v[o])              link_busy[o] <= tx_cycles(osel[o].len) - 1'b1;
        else if (link_busy[o] != 0) link_busy[o] <= link_busy[o] - 1'b1;
        for (int v = 0; v < 2; v++) begin
          credits[o][v] <= credits[o][v]
            - ((osel_v[o] && osel_vc[o] == vc_e'(v)) ? crd_bytes(osel[o].len) : '0)
            + ((out_crd[o].valid && out_crd[o].vc == vc_e'(v)) ? CRD_W'(out_crd[o].bytes) : '0);
        end
      end
    end
  end

  // ---------------- activity counters ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stats <= '0;
    else begin
      logic [15:0] n_enq, n_win, n_byp, n_stall, n_crc;
      n_enq = '0; n_win = '0; n_byp = '0; n_stall = '0; n_crc = '0;
      for (int p = 0; p < NPORTS; p++) begin
        n_enq += 16'(i_to_enq[p]) + 16'(o_to_enq[p]);
        n_win += 16'(i_to_win[p]) + 16'(o_to_win[p]);
        if (osel_v[p] && osel_vc[p] == VC_BE && ohead_v[p][0]) n_byp += 1;
        if (!osel_v[p] && link_busy[p] == '0 && (ohead_v[p] != 2'b00)) n_stall += 1;
        if (in_link[p].valid && !icrc_ok[p]) n_crc += 1;
      end
      stats.takeover_enq <= sat_add(stats.takeover_enq, n_enq);
      stats.takeover_win <= sat_add(stats.takeover_win, n_win);
      stats.be_bypass    <= sat_add(stats.be_bypass, n_byp);
      stats.credit_stall <= sat_add(stats.credit_stall, n_stall);
      stats.crc_err      <= sat_add(stats.crc_err, n_crc);
    end
  end

endmodule
