// tb_edf_network: end-to-end run of the network with four traffic classes per
// host (control, smoothed video frames, best-effort, background), every node
// on a different clock offset, and a burst phase that overloads one host so
// that credits run out. Checks that every packet arrives exactly once at its
// destination, in order within its flow, with a good header CRC and with a
// time-to-destination consistent with the deadline stamped at the source, and
// that each mechanism of the design (take-over queue, take-over win, VC1
// bypass, switch and host credit stalls, eligibility hold, spine route, local
// turn-around) happened at least once. Random traffic is followed by two
// directed phases: the order-error case of a late packet overtaken by an
// urgent one, and a VC0 credit exhaustion with best-effort traffic behind it.
// The network here is 4 hosts on 2 leaves and 2 spines; the
// full-size default network is exercised by tb_edf_network_full.
module tb_edf_network;
  import edf_pkg::*;
  import tb_util_pkg::*;
  localparam int HPL = 2, NL = 2, NS = 2, NH = HPL * NL, NF = 4;
  localparam int EF = 200;
  localparam int RUN = 30000;

  logic clk = 0, rst_n = 0;
  time_t host_t_offset [NH], leaf_t_offset [NL], spine_t_offset [NS];
  logic cfg_we [NH];
  logic [1:0] cfg_flow [NH];
  flow_cfg_t cfg [NH];
  logic req_valid [NH], req_ready [NH];
  app_req_t req [NH];
  logic rx_valid [NH], rx_crc_ok [NH];
  pkt_t rx_pkt [NH];
  host_stats_t host_stats [NH];
  sw_stats_t leaf_stats [NL], spine_stats [NS];
  int checks = 0, failures = 0;
  int cyc = 0;

  edf_network #(.HPL(HPL), .N_LEAF(NL), .N_SPINE(NS), .NFLOWS(NF), .QDEPTH(16),
                .ELIG_FACTOR(EF)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // per packet: key = (src*NF + flow) * 65536 + seq
  int    delta [int];      // deadline minus testbench cycle at acceptance
  int    dst_of [int];
  int    next_rx [int];    // per (src,flow,dest): lowest acceptable next seq
  int    n_sent = 0, n_rcvd = 0, n_spine = 0, n_local = 0;
  typedef struct { int at, f, dst, len, parts, reps; } dreq_t;
  dreq_t directed [NH][$];
  localparam int T0 = RUN + 25000;   // directed phases start after the random traffic drains
  localparam int T1 = T0 + 8000;
  initial begin
    // order error: host 3 sends a late-deadline video packet to host 0 (eligible
    // 200 cycles before its deadline), then, while it waits behind host 1's
    // control burst in leaf 0, an urgent control packet on the same route.
    directed[3].push_back('{T0, 1, 0, 256, 1, 1});
    directed[1].push_back('{T0 + 2600, 0, 0, 2048, 1, 8});
    directed[3].push_back('{T0 + 2850, 0, 0, 128, 1, 1});
    // VC0 credits exhausted between spine 0 and leaf 0, best effort behind them
    directed[1].push_back('{T1, 0, 0, 2048, 1, 12});
    directed[2].push_back('{T1, 0, 0, 2048, 1, 12});
    directed[2].push_back('{T1 + 10, 2, 0, 1024, 1, 2});
  end
  logic  burst = 0;

  for (genvar h = 0; h < NH; h++) begin : g_tr
    int seq [NF];
    initial begin
      for (int f = 0; f < NF; f++) seq[f] = 0;
      cfg_we[h] = 0; cfg_flow[h] = 0; cfg[h] = '0; req_valid[h] = 0; req[h] = '0;
      @(posedge rst_n);
      for (int f = 0; f < NF; f++) begin
        flow_cfg_t c;
        c = '0;
        case (f)
          0: begin c.mode = DL_RATE;  c.vc = VC_REG; c.inv_bw = 16'd32;   end // control
          1: begin c.mode = DL_FRAME; c.vc = VC_REG; c.smooth = 1; c.frame_lat = 3000; end
          2: begin c.mode = DL_RATE;  c.vc = VC_BE;  c.inv_bw = 16'd512;  end // best effort
          3: begin c.mode = DL_RATE;  c.vc = VC_BE;  c.inv_bw = 16'd2048; end // background
        endcase
        @(negedge clk); cfg_we[h] = 1; cfg_flow[h] = 2'(f); cfg[h] = c;
        @(negedge clk); cfg_we[h] = 0;
      end
      while (cyc < RUN || directed[h].size() > 0) begin
        int f, len, parts, dst, reps;
        if (cyc < RUN) begin
          repeat ($urandom_range(1, 60)) @(negedge clk);
          f = burst ? ($urandom_range(0, 1) == 1 ? 0 : 3) : $urandom_range(0, NF - 1);
          reps = 1; parts = 1;
          case (f)
            0: begin len = burst ? 2048 : $urandom_range(128, 512); dst = burst ? (h == 0 ? 1 : 0) : (h + 2) % NH; end
            1: begin parts = $urandom_range(2, 6); reps = parts; len = 1024; dst = h ^ 1; end
            2: begin len = 2048; reps = $urandom_range(1, 4); dst = (h == 0) ? 1 : 0; end
            default: begin len = $urandom_range(128, 1024); dst = burst ? 1 : (h + 3) % NH; end
          endcase
        end else begin
          dreq_t d;
          while (cyc < directed[h][0].at) @(negedge clk);
          d = directed[h].pop_front();
          f = d.f; dst = d.dst; len = d.len; parts = d.parts; reps = d.reps;
        end
        for (int r = 0; r < reps; r++) begin
          int key;
          req_valid[h] = 1;
          req[h] = '0; req[h].flow = FLOW_W'(f); req[h].dest = NODE_W'(dst);
          req[h].up_sel = ROUTE_W'(h % NS);   // one fixed route per host pair
          req[h].len = LEN_W'(len); req[h].parts = 16'(parts);
          #1;
          while (!req_ready[h]) begin @(negedge clk); #1; end
          key = (h * NF + f) * 65536 + seq[f];
          // deadline minus the sender's clock, both sampled before the accepting edge
          delta[key] = int'(dut.g_host[h].u_host.new_dl) - int'(dut.g_host[h].u_host.t_local) + cyc;
          @(posedge clk);
          dst_of[key] = dst;
          seq[f]++;
          n_sent++;
          if (dst / HPL != h / HPL) n_spine++; else n_local++;
          @(negedge clk);
          req_valid[h] = 0;
        end
      end
    end

    always @(posedge clk) begin
      if (rst_n && rx_valid[h]) begin
        pkt_t p;
        int key, fk, slack_exp;
        p = rx_pkt[h];
        fk = int'(p.src) * NF + int'(p.flow);
        key = fk * 65536 + int'(p.seq);
        n_rcvd++;
        checks++;
        if (!rx_crc_ok[h]) begin failures++; $display("FAIL crc at host %0d", h); end
        checks++;
        if (!dst_of.exists(key) || dst_of[key] != h || int'(p.dest) != h) begin
          failures++; $display("FAIL misdelivered key %0h at %0d", key, h);
        end
        checks++;
        // within a flow and destination, sequence numbers must only increase
        if (!next_rx.exists(fk * NH + h)) next_rx[fk * NH + h] = 0;
        if (int'(p.seq) < next_rx[fk * NH + h]) begin
          failures++; $display("FAIL flow %0d order: got %0d after %0d", fk, p.seq, next_rx[fk * NH + h] - 1);
        end
        next_rx[fk * NH + h] = int'(p.seq) + 1;
        // remaining TTD = deadline - now (in the sender's frame) minus a few link cycles
        slack_exp = delta[key] - cyc;
        checks++;
        if ($signed(p.dl) > slack_exp || $signed(p.dl) < slack_exp - 8) begin
          failures++; $display("FAIL TTD at delivery %0d expected %0d", $signed(p.dl), slack_exp);
        end
      end
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sum_sw(int which);
    int s;
    s = 0;
    for (int l = 0; l < NL; l++)
      s += (which == 0) ? leaf_stats[l].takeover_enq : (which == 1) ? leaf_stats[l].takeover_win :
           (which == 2) ? leaf_stats[l].be_bypass : (which == 3) ? leaf_stats[l].credit_stall : leaf_stats[l].crc_err;
    for (int l = 0; l < NS; l++)
      s += (which == 0) ? spine_stats[l].takeover_enq : (which == 1) ? spine_stats[l].takeover_win :
           (which == 2) ? spine_stats[l].be_bypass : (which == 3) ? spine_stats[l].credit_stall : spine_stats[l].crc_err;
    return s;
  endfunction

  task automatic mech(string name, int n);
    checks++;
    $display("  %-28s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", name); end
  endtask

  initial begin
    int elig, hstall;
    for (int h = 0; h < NH; h++) host_t_offset[h] = time_t'(h * 1000);
    for (int l = 0; l < NL; l++) leaf_t_offset[l] = time_t'(32'h8000_0000 + l * 77);
    for (int s = 0; s < NS; s++) spine_t_offset[s] = time_t'(32'hFFFF_0000 + s * 5);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (cyc >= RUN / 2);
    burst = 1;
    wait (cyc >= RUN / 2 + 3000);
    burst = 0;
    wait (cyc >= T1 + 30000);
    checks++;
    if (n_sent != n_rcvd) begin failures++; $display("FAIL sent %0d received %0d", n_sent, n_rcvd); end
    elig = 0; hstall = 0;
    for (int h = 0; h < NH; h++) begin elig += host_stats[h].elig_hold; hstall += host_stats[h].credit_stall; end
    $display("packets sent %0d received %0d", n_sent, n_rcvd);
    mech("take-over enqueue", sum_sw(0));
    mech("take-over win", sum_sw(1));
    mech("VC1 bypass of blocked VC0", sum_sw(2));
    mech("switch credit stall", sum_sw(3));
    mech("host credit stall", hstall);
    mech("host eligibility hold", elig);
    mech("route through a spine", n_spine);
    mech("turn-around in a leaf", n_local);
    checks++;
    if (sum_sw(4) != 0) begin failures++; $display("FAIL CRC errors in switches"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
