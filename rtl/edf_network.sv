// edf_network: a cluster interconnect in which hosts schedule per flow by
// earliest deadline and switches keep only two virtual channels of FIFOs.
//
// Topology: a two-stage folded (bidirectional) multistage network built from
// edf_switch. N_LEAF leaf switches each serve HPL hosts on ports 0..HPL-1 and
// connect through ports HPL..HPL+N_SPINE-1 to the N_SPINE spine switches;
// spine s port l connects to leaf l port HPL+s. With the defaults (HPL = 8,
// N_LEAF = 16, N_SPINE = 8) this is 128 endpoints on 24 switches of 16 ports.
// A packet between hosts of different leaves takes the fixed route through
// the spine named by its up_sel field, chosen when the flow is admitted; a
// packet between hosts of the same leaf turns around in the leaf.
//
// Every host has an edf_host_if: applications configure flows on cfg_* and
// offer packets on req_*; delivered packets come out on rx_* with their
// remaining time-to-destination. Every node runs its own local clock from its
// own *_t_offset, since deadlines travel as time-to-destination and need no
// clock synchronisation. All links are registered in both directions and
// carry one header per cycle at most, then stay busy for the packet's length
// at 8 bytes per cycle. Admission control (which keeps the regulated load of
// every link below its share) is performed outside the network, by whoever
// configures the flows; the network keeps no per-flow state.
module edf_network
  import edf_pkg::*;
#(
  parameter int HPL         = 8,
  parameter int N_LEAF      = 16,
  parameter int N_SPINE     = 8,
  parameter int NFLOWS      = 16,
  parameter int QDEPTH      = 64,   // a 120 Kbyte frame is 60 packets of 2 Kbyte
  parameter int DEPTH       = VC_BYTES / MIN_PKT,
  parameter int ELIG_FACTOR = 2500,
  localparam int NH         = HPL * N_LEAF,
  localparam int LEAF_PORTS = HPL + N_SPINE
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  time_t                     host_t_offset  [NH],
  input  time_t                     leaf_t_offset  [N_LEAF],
  input  time_t                     spine_t_offset [N_SPINE],
  input  logic                      cfg_we         [NH],
  input  logic [$clog2(NFLOWS)-1:0] cfg_flow       [NH],
  input  flow_cfg_t                 cfg            [NH],
  input  logic                      req_valid      [NH],
  input  app_req_t                  req            [NH],
  output logic                      req_ready      [NH],
  output logic                      rx_valid       [NH],
  output pkt_t                      rx_pkt         [NH],
  output logic                      rx_crc_ok      [NH],
  output host_stats_t               host_stats     [NH],
  output sw_stats_t                 leaf_stats     [N_LEAF],
  output sw_stats_t                 spine_stats    [N_SPINE]
);
  link_fwd_t leaf_in     [N_LEAF][LEAF_PORTS];
  link_crd_t leaf_in_crd [N_LEAF][LEAF_PORTS];
  link_fwd_t leaf_out    [N_LEAF][LEAF_PORTS];
  link_crd_t leaf_out_crd[N_LEAF][LEAF_PORTS];
  link_fwd_t spn_in      [N_SPINE][N_LEAF];
  link_crd_t spn_in_crd  [N_SPINE][N_LEAF];
  link_fwd_t spn_out     [N_SPINE][N_LEAF];
  link_crd_t spn_out_crd [N_SPINE][N_LEAF];

  for (genvar h = 0; h < NH; h++) begin : g_host
    edf_host_if #(
      .NODE_ID(h), .NFLOWS(NFLOWS), .QDEPTH(QDEPTH), .ELIG_FACTOR(ELIG_FACTOR)
    ) u_host (
      .clk, .rst_n, .t_offset(host_t_offset[h]),
      .cfg_we(cfg_we[h]), .cfg_flow(cfg_flow[h]), .cfg(cfg[h]),
      .req_valid(req_valid[h]), .req(req[h]), .req_ready(req_ready[h]),
      .out_link(leaf_in[h / HPL][h % HPL]),
      .out_crd (leaf_in_crd[h / HPL][h % HPL]),
      .in_link (leaf_out[h / HPL][h % HPL]),
      .in_crd  (leaf_out_crd[h / HPL][h % HPL]),
      .rx_valid(rx_valid[h]), .rx_pkt(rx_pkt[h]), .rx_crc_ok(rx_crc_ok[h]),
      .stats(host_stats[h])
    );
  end

  for (genvar l = 0; l < N_LEAF; l++) begin : g_leaf
    edf_switch #(
      .NPORTS(LEAF_PORTS), .IS_SPINE(1'b0), .SW_ID(l), .HPL(HPL), .DEPTH(DEPTH)
    ) u_sw (
      .clk, .rst_n, .t_offset(leaf_t_offset[l]),
      .in_link(leaf_in[l]), .in_crd(leaf_in_crd[l]),
      .out_link(leaf_out[l]), .out_crd(leaf_out_crd[l]),
      .stats(leaf_stats[l])
    );
    for (genvar s = 0; s < N_SPINE; s++) begin : g_up
      assign spn_in[s][l]             = leaf_out[l][HPL + s];
      assign leaf_out_crd[l][HPL + s] = spn_in_crd[s][l];
      assign leaf_in[l][HPL + s]      = spn_out[s][l];
      assign spn_out_crd[s][l]        = leaf_in_crd[l][HPL + s];
    end
  end

  for (genvar s = 0; s < N_SPINE; s++) begin : g_spine
    edf_switch #(
      .NPORTS(N_LEAF), .IS_SPINE(1'b1), .SW_ID(s), .HPL(HPL), .DEPTH(DEPTH)
    ) u_sw (
      .clk, .rst_n, .t_offset(spine_t_offset[s]),
      .in_link(spn_in[s]), .in_crd(spn_in_crd[s]),
      .out_link(spn_out[s]), .out_crd(spn_out_crd[s]),
      .stats(spine_stats[s])
    );
  end

  initial begin
    assert (NH <= (1 << NODE_W)) else $error("more hosts than the header can address");
    assert (N_SPINE <= (1 << ROUTE_W)) else $error("more spines than up_sel can name");
  end
endmodule
