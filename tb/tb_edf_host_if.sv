// tb_edf_host_if: host interface with an eligibility factor of 3 cycles, as in
// the order-error example: a video frame of 4 packets whose deadlines are 5
// cycles apart, a control packet issued while video packets wait for their
// eligible time, best-effort packets that must yield to ready regulated ones
// but may use the link while regulated ones only wait for eligibility, a
// credit stall, and the receive path with good and bad header CRCs.
// Every injected packet's TTD is compared with a deadline model of the flow.
module tb_edf_host_if;
  import edf_pkg::*;
  import tb_util_pkg::*;
  localparam int EF = 3;
  logic clk = 0, rst_n = 0;
  time_t t_offset = 32'd100;
  logic cfg_we;
  logic [1:0] cfg_flow;
  flow_cfg_t cfg;
  logic req_valid, req_ready;
  app_req_t req;
  link_fwd_t out_link, in_link;
  link_crd_t out_crd, in_crd;
  logic rx_valid, rx_crc_ok;
  pkt_t rx_pkt;
  host_stats_t stats;
  int checks = 0, failures = 0;

  edf_host_if #(.NODE_ID(3), .NFLOWS(4), .QDEPTH(8), .ELIG_FACTOR(EF)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- deadline model ----
  flow_cfg_t mcfg [4];
  time_t     mdl [4];
  logic      mv [4];
  time_t     exp_dl [int];   // key flow*65536+seq
  int        mseq [4];
  int        sent_order[$];  // keys in link order
  time_t     sent_ttd[$];
  logic      hold_credits = 0;
  int        owed_bytes [2];

  task automatic set_flow(int f, dl_mode_e m, vc_e vc, logic sm, int inv, int lat);
    flow_cfg_t c;
    c = '0; c.mode = m; c.vc = vc; c.smooth = sm; c.inv_bw = 16'(inv); c.frame_lat = time_t'(lat);
    @(negedge clk); cfg_we = 1; cfg_flow = 2'(f); cfg = c; mcfg[f] = c;
    @(posedge clk); #1 cfg_we = 0;
  endtask

  task automatic request(int f, int len, int parts);
    time_t tn, base;
    @(negedge clk);
    req_valid = 1; req = '0; req.flow = FLOW_W'(f); req.dest = 7'd9; req.len = LEN_W'(len);
    req.parts = 16'(parts);
    forever begin
      @(posedge clk);
      if (req_ready) break;
    end
    tn = dut.t_local;
    base = (mv[f] && $signed(mdl[f] - tn) > 0) ? mdl[f] : tn;
    mdl[f] = base + (mcfg[f].mode == DL_FRAME ? mcfg[f].frame_lat / parts
                                               : time_t'((len * mcfg[f].inv_bw) >> 8));
    mv[f] = 1;
    exp_dl[f * 65536 + mseq[f]] = mdl[f];
    mseq[f]++;
    #1 req_valid = 0;
  endtask

  // ---- link monitor and credit return ----
  always @(posedge clk) begin
    if (rst_n && out_link.valid) begin
      pkt_t p;
      int key;
      time_t ttd_exp;
      p = out_link.pkt;
      key = int'(p.flow) * 65536 + int'(p.seq);
      ttd_exp = exp_dl[key] - dut.t_local;
      checks++;
      if (p.dl != ttd_exp) begin
        failures++; $display("FAIL TTD flow %0d seq %0d got %0d exp %0d", p.flow, p.seq, p.dl, ttd_exp);
      end
      checks++;
      if (p.crc != ref_crc(p) || p.src != 3 || p.dest != 9) begin failures++; $display("FAIL header"); end
      sent_order.push_back(key);
      sent_ttd.push_back(p.dl);
      owed_bytes[p.vc] += crd_bytes(p.len);
    end
  end
  always @(negedge clk) begin
    out_crd = '0;
    if (!hold_credits) begin
      for (int v = 0; v < 2; v++) if (owed_bytes[v] > 0 && !out_crd.valid) begin
        out_crd.valid = 1; out_crd.vc = vc_e'(v);
        out_crd.bytes = LEN_W'(owed_bytes[v] > 2048 ? 2048 : owed_bytes[v]);
        owed_bytes[v] -= int'(out_crd.bytes);
      end
    end
  end

  function automatic int pos_of(int key);
    foreach (sent_order[i]) if (sent_order[i] == key) return i;
    return -1;
  endfunction

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p;
    cfg_we = 0; cfg_flow = 0; cfg = '0; req_valid = 0; req = '0; in_link = '0;
    owed_bytes[0] = 0; owed_bytes[1] = 0;
    for (int f = 0; f < 4; f++) begin mv[f] = 0; mseq[f] = 0; mdl[f] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    set_flow(0, DL_RATE,  VC_REG, 0, 32, 0);     // control: link rate
    set_flow(1, DL_FRAME, VC_REG, 1, 0, 20);     // video: 20-cycle frame latency, smoothed
    set_flow(2, DL_RATE,  VC_BE,  0, 256, 0);    // best effort: 1 cycle per byte
    // video frame of 4 packets: deadlines 5 cycles apart, each leaves within EF of its deadline
    for (int k = 0; k < 4; k++) request(1, 8, 4);
    repeat (7) @(posedge clk);
    request(0, 8, 0);                          // control packet while video waits
    repeat (40) @(posedge clk);
    check(sent_order.size() == 5, "all five sent");
    for (int k = 0; k < 4; k++) begin
      p = pos_of(65536 + k);
      check(p >= 0 && $signed(sent_ttd[p]) <= EF && $signed(sent_ttd[p]) >= EF - 3,
            "video packet leaves within the eligibility factor of its deadline");
    end
    check(pos_of(0) > pos_of(65536 + 1) && pos_of(0) < pos_of(65536 + 3),
          "control packet injected between waiting video packets");
    check(stats.elig_hold > 0, "eligibility hold counted");
    // best effort yields to ready regulated packets
    sent_order.delete(); sent_ttd.delete();
    request(0, 2048, 0); request(2, 128, 0); request(0, 2048, 0); request(0, 2048, 0);
    repeat (900) @(posedge clk);
    check(sent_order.size() == 4 && pos_of(2 * 65536) == 3,
          "best effort goes only when no regulated packet is ready");
    // best effort uses the link while video waits for eligibility
    set_flow(1, DL_FRAME, VC_REG, 1, 0, 400);
    sent_order.delete(); sent_ttd.delete();
    request(1, 64, 1); request(2, 128, 0);
    repeat (500) @(posedge clk);
    check(sent_order.size() == 2 && pos_of(2 * 65536 + 1) == 0, "best effort passes a not-yet-eligible packet");
    // credit stall: 5 x 2048 bytes of control with credits withheld
    hold_credits = 1;
    sent_order.delete(); sent_ttd.delete();
    for (int k = 0; k < 5; k++) request(0, 2048, 0);
    repeat (1400) @(posedge clk);
    check(sent_order.size() == 4, "stalls after 8 Kbyte without credits");
    check(stats.credit_stall > 0, "credit stall counted");
    hold_credits = 0;
    repeat (400) @(posedge clk);
    check(sent_order.size() == 5, "resumes when credits return");
    // receive path
    @(negedge clk);
    in_link.valid = 1; in_link.pkt = with_crc(mk_pkt(123, 3, 9, 0, VC_BE, 600, 1, 77));
    @(negedge clk);
    in_link = '0;
    check(rx_valid && rx_crc_ok && rx_pkt.seq == 77 && rx_pkt.dl == 122, "delivered with TTD");
    check(in_crd.valid && in_crd.vc == VC_BE && in_crd.bytes == 600, "receive credit returned");
    in_link.valid = 1; in_link.pkt = with_crc(mk_pkt(5, 3, 9, 0, VC_REG, 64, 1, 78));
    in_link.pkt.len = 65;   // corrupt after CRC
    @(negedge clk);
    in_link = '0;
    check(rx_valid && !rx_crc_ok, "bad CRC flagged");
    @(negedge clk);
    check(stats.crc_err == 1, "CRC error counted");
    check(stats.inj_reg == 14 && stats.inj_be == 2, "injection counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
