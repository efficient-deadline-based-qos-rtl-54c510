// sorted_queue: small priority queue that keeps packet descriptors ordered by
// an associated time key (earliest key at the head).
//
// The host interface uses three of these: the eligible-time queue and the
// deadline queue of the regulated virtual channel, and the best-effort queue
// ordered by deadline. Hosts are assumed to have room for such sorted storage;
// switches never use it.
//
// Implementation: a shift-register array, entry 0 is the head. A push is
// inserted behind every entry whose key is earlier than or equal to its own
// (stable for equal keys, so the arrival order of a flow is kept), found by
// comparing against all entries in parallel. A pop shifts everything one place
// towards the head. Push and pop may happen in the same cycle. Keys are
// compared modulo 2**TIME_W. Head outputs are registered-state reads.
module sorted_queue
  import edf_pkg::*;
#(
  parameter int DEPTH = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  time_t                      push_key,
  input  pkt_t                       push_pkt,
  input  logic                       pop,
  output time_t                      head_key,
  output pkt_t                       head_pkt,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int CW = $clog2(DEPTH+1);

  time_t keys [DEPTH];
  pkt_t  pkts [DEPTH];

  time_t keys_n [DEPTH];
  pkt_t  pkts_n [DEPTH];
  logic [CW-1:0] count_n;

  assign empty    = (count == '0);
  assign full     = (count == CW'(DEPTH));
  assign head_key = keys[0];
  assign head_pkt = pkts[0];

  always_comb begin
    time_t     k_s [DEPTH];
    pkt_t      p_s [DEPTH];
    logic [CW-1:0] n_s;
    logic [CW-1:0] pos;
    // step 1: remove the head
    for (int i = 0; i < DEPTH; i++) begin
      if (pop && i < DEPTH - 1) begin
        k_s[i] = keys[i+1];
        p_s[i] = pkts[i+1];
      end else begin
        k_s[i] = keys[i];
        p_s[i] = pkts[i];
      end
    end
    n_s = pop ? count - 1'b1 : count;
    // step 2: insert behind all entries with key <= push_key
    pos = '0;
    for (int i = 0; i < DEPTH; i++)
      if (CW'(i) < n_s && !dl_lt(push_key, k_s[i])) pos = CW'(i + 1);
    for (int i = 0; i < DEPTH; i++) begin
      if (push && CW'(i) > pos) begin
        keys_n[i] = k_s[i-1];
        pkts_n[i] = p_s[i-1];
      end else if (push && CW'(i) == pos) begin
        keys_n[i] = push_key;
        pkts_n[i] = push_pkt;
      end else begin
        keys_n[i] = k_s[i];
        pkts_n[i] = p_s[i];
      end
    end
    count_n = push ? n_s + 1'b1 : n_s;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < DEPTH; i++) begin
      keys[i] <= keys_n[i];
      pkts[i] <= pkts_n[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count_n;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule
