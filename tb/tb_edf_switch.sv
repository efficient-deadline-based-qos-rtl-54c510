// tb_edf_switch: a 4-port leaf switch (2 host ports, 2 up ports) with its local
// clock offset from the testbench's. Checks fixed routing, the TTD rewrite
// (TTD out = TTD in - cycles from arrival to arrival at the next node), header CRC regeneration, deadline
// merging of input heads at the crossbar, the take-over queue, VC0 priority,
// VC1 bypass of a credit-blocked VC0, credit stalls, CRC error counting and
// the return of every input credit.
module tb_edf_switch;
  import edf_pkg::*;
  import tb_util_pkg::*;
  localparam int NP = 4;
  logic clk = 0, rst_n = 0;
  time_t t_offset = 32'hFFFF_F000;   // wraps during the test
  link_fwd_t in_link [NP];
  link_crd_t in_crd  [NP];
  link_fwd_t out_link[NP];
  link_crd_t out_crd [NP];
  sw_stats_t stats;
  int checks = 0, failures = 0;
  int cyc = 0;

  edf_switch #(.NPORTS(NP), .IS_SPINE(1'b0), .SW_ID(0), .HPL(2), .DEPTH(64)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // ---- per-input senders honouring link occupancy ----
  pkt_t sendq [NP][$];
  int   busy  [NP];
  int   in_cyc [int];      // seq -> cycle sampled by the switch
  time_t in_ttd [int];
  logic corrupt_next = 0;
  int   sent_bytes = 0, crd_bytes_back = 0;

  always @(negedge clk) begin
    for (int i = 0; i < NP; i++) begin
      in_link[i] = '0;
      if (rst_n && busy[i] == 0 && sendq[i].size() > 0) begin
        pkt_t p;
        p = with_crc(sendq[i].pop_front());
        if (corrupt_next && i == 3) begin p.crc = ~p.crc; corrupt_next = 0; end
        in_link[i].valid = 1; in_link[i].pkt = p;
        in_cyc[p.seq] = cyc; in_ttd[p.seq] = p.dl;
        busy[i] = tx_cycles(p.len);
        sent_bytes += crd_bytes(p.len);
      end
      if (busy[i] > 0) busy[i]--;
    end
  end

  // ---- receivers: record arrivals, return credits unless held ----
  int    got_seq [NP][$];
  logic  hold_vc0 [NP];
  int    held_bytes [NP];
  int    pend [NP][$];   // credit returns queued: {vc, bytes}
  always @(negedge clk) begin
    for (int o = 0; o < NP; o++) begin
      out_crd[o] = '0;
      if (!hold_vc0[o] && held_bytes[o] > 0) begin
        out_crd[o].valid = 1; out_crd[o].vc = VC_REG; out_crd[o].bytes = LEN_W'(held_bytes[o] > 2048 ? 2048 : held_bytes[o]);
        held_bytes[o] -= int'(out_crd[o].bytes);
      end else if (pend[o].size() > 0) begin
        int v;
        v = pend[o].pop_front();
        out_crd[o].valid = 1; out_crd[o].vc = vc_e'(v >> 16); out_crd[o].bytes = LEN_W'(v & 16'hFFFF);
      end
    end
  end
  always @(posedge clk) begin
    for (int o = 0; o < NP; o++) begin
      if (!rst_n) continue;
      if (in_crd[o].valid) crd_bytes_back += in_crd[o].bytes;
      if (out_link[o].valid) begin
        pkt_t p;
        p = out_link[o].pkt;
        got_seq[o].push_back(int'(p.seq));
        checks++;
        if (p.crc != ref_crc(p)) begin failures++; $display("FAIL crc on out %0d", o); end
        checks++;
        if (p.dl != in_ttd[p.seq] - time_t'(cyc - in_cyc[p.seq])) begin
          failures++;
          $display("FAIL TTD seq %0d: got %0d exp %0d", p.seq, p.dl,
                   in_ttd[p.seq] - time_t'(cyc - in_cyc[p.seq]));
        end
        if (p.vc == VC_REG && hold_vc0[o]) held_bytes[o] += crd_bytes(p.len);
        else pend[o].push_back((int'(p.vc) << 16) | int'(crd_bytes(p.len)));
      end
    end
  end

  task automatic wait_cycles(int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic expect_order(int o, int exp[$], string what);
    check(got_seq[o].size() == exp.size(), {what, ": count"});
    for (int k = 0; k < exp.size() && k < got_seq[o].size(); k++)
      check(got_seq[o][k] == exp[k], {what, ": order"});
    if (got_seq[o] != exp) $display("  %s got %p expected %p", what, got_seq[o], exp);
    got_seq[o].delete();
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seq;
    int exp[$];
    seq = 0;
    for (int i = 0; i < NP; i++) begin busy[i] = 0; hold_vc0[i] = 0; held_bytes[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // A: routing. dest 1 is local (port 1); dest 5 via spine 1 (port 3); dest 4 via spine 0 (port 2)
    sendq[0].push_back(mk_pkt(4000, 1, 0, 0, VC_REG, 256, 0, 1));
    sendq[0].push_back(mk_pkt(4000, 5, 0, 1, VC_REG, 256, 0, 2));
    sendq[0].push_back(mk_pkt(4000, 4, 0, 0, VC_BE,  256, 0, 3));
    wait_cycles(200);
    exp = '{1}; expect_order(1, exp, "local route");
    exp = '{2}; expect_order(3, exp, "up route, spine 1");
    exp = '{3}; expect_order(2, exp, "up route, spine 0");
    // B: merge of input heads by deadline. 10 blocks port 1 for 256 cycles.
    sendq[0].push_back(mk_pkt(90000, 1, 0, 0, VC_REG, 2048, 1, 10));
    wait_cycles(3);
    sendq[1].push_back(mk_pkt(900, 1, 0, 0, VC_REG, 128, 2, 11));
    sendq[2].push_back(mk_pkt(500, 1, 0, 0, VC_REG, 128, 3, 12));
    wait_cycles(700);
    exp = '{10, 12, 11}; expect_order(1, exp, "deadline merge");
    // C: order error in one input queue; 20 blocks port 0
    sendq[1].push_back(mk_pkt(90000, 0, 0, 0, VC_REG, 2048, 4, 20));
    wait_cycles(3);
    sendq[3].push_back(mk_pkt(7000,  0, 0, 0, VC_REG, 128, 5, 21));
    sendq[3].push_back(mk_pkt(12000, 0, 0, 0, VC_REG, 128, 5, 22));
    sendq[3].push_back(mk_pkt(11000, 0, 0, 0, VC_REG, 128, 6, 23));
    wait_cycles(700);
    exp = '{20, 21, 23, 22}; expect_order(0, exp, "take-over overtakes");
    check(stats.takeover_enq >= 1, "take-over enqueue counted");
    check(stats.takeover_win >= 1, "take-over win counted");
    // D: VC0 credits of port 2 held: 64 x 128 B pass, the 65th waits, VC1 bypasses it
    hold_vc0[2] = 1;
    for (int k = 0; k < 65; k++) sendq[0].push_back(mk_pkt(2000 + k, 4, 0, 0, VC_REG, 128, 7, 100 + k));
    wait_cycles(1300);
    sendq[1].push_back(mk_pkt(100, 4, 0, 0, VC_BE, 128, 8, 300));
    wait_cycles(100);
    exp.delete();
    for (int k = 0; k < 64; k++) exp.push_back(100 + k);
    exp.push_back(300);
    expect_order(2, exp, "credit stall and VC1 bypass");
    check(stats.credit_stall > 0, "credit stall counted");
    check(stats.be_bypass >= 1, "VC1 bypass counted");
    hold_vc0[2] = 0;
    wait_cycles(100);
    exp = '{164}; expect_order(2, exp, "released after credits return");
    // E: a corrupted header is counted
    corrupt_next = 1;
    sendq[3].push_back(mk_pkt(3000, 0, 0, 0, VC_BE, 128, 9, 400));
    wait_cycles(60);
    check(stats.crc_err == 1, "CRC error counted");
    void'(got_seq[0].pop_front());
    wait_cycles(20);
    check(crd_bytes_back == sent_bytes, "every input credit returned");
    $display("stats: enq %0d win %0d bypass %0d stall %0d crc %0d", stats.takeover_enq,
             stats.takeover_win, stats.be_bypass, stats.credit_stall, stats.crc_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
