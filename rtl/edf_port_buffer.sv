// edf_port_buffer: one switch port buffer (input or output side) with two
// virtual channels.
//
// VC allocation steers each arriving descriptor by its VC field: VC0
// (regulated traffic) into an edf_vc0_buffer (ordered queue plus take-over
// queue), VC1 (best-effort traffic) into a single common FIFO. The output MUX
// gives regulated traffic absolute priority: it offers the VC0 head whenever
// that head can go (`vc_ready[0]`), and the VC1 head only otherwise. The
// consumer computes `vc_ready` from `head_pkt` (credits, free output port) and
// pulses `pop` to take the offered packet (`sel_*`).
// Timing: heads and the selection are combinational from buffer state; a
// push and a pop may happen in the same cycle; a popped packet leaves at the
// clock edge. Each VC holds up to DEPTH descriptors; the byte occupancy per VC
// is bounded by the upstream credit counter (VC_BYTES per VC).
module edf_port_buffer
  import edf_pkg::*;
#(
  parameter int DEPTH = 64   // descriptors per queue: 8 Kbyte / 128-byte minimum packet
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  pkt_t             din,
  input  logic [1:0]       vc_ready,
  output logic [1:0]       head_valid,
  output pkt_t             head_pkt [2],
  output logic             sel_valid,
  output pkt_t             sel_pkt,
  output vc_e              sel_vc,
  input  logic             pop,
  output logic [CRD_W-1:0] bytes_used [2],
  output logic             ev_takeover_enq,  // a packet entered the take-over queue
  output logic             ev_takeover_win   // a take-over head was sent ahead of the ordered head
);
  localparam int CW = $clog2(DEPTH+1);

  logic          push0, push1, pop0, pop1;
  logic          from_u;
  logic          be_empty, be_full;
  logic [CW-1:0] be_count;
  pkt_t          be_tail_unused;

  assign push0 = push && (din.vc == VC_REG);
  assign push1 = push && (din.vc == VC_BE);

  edf_vc0_buffer #(.DEPTH(DEPTH)) u_vc0 (
    .clk, .rst_n, .push(push0), .din, .pop(pop0),
    .head_valid(head_valid[0]), .head(head_pkt[0]), .head_from_u(from_u),
    .enq_to_u(ev_takeover_enq), .bytes_used(bytes_used[0])
  );

  desc_fifo #(.DEPTH(DEPTH)) u_common (
    .clk, .rst_n, .push(push1), .din, .pop(pop1),
    .head(head_pkt[1]), .tail(be_tail_unused), .empty(be_empty), .full(be_full), .count(be_count)
  );
  assign head_valid[1] = !be_empty;

  always_comb begin
    if (head_valid[0] && vc_ready[0]) begin
      sel_valid = 1'b1;
      sel_vc    = VC_REG;
    end else begin
      sel_valid = head_valid[1] && vc_ready[1];
      sel_vc    = VC_BE;
    end
    sel_pkt = (sel_vc == VC_REG) ? head_pkt[0] : head_pkt[1];
  end

  assign pop0 = pop && (sel_vc == VC_REG);
  assign pop1 = pop && (sel_vc == VC_BE);
  assign ev_takeover_win = pop0 && from_u;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bytes_used[1] <= '0;
    else bytes_used[1] <= bytes_used[1] + (push1 ? crd_bytes(din.len) : '0) - (pop1 ? crd_bytes(head_pkt[1].len) : '0);
  end

  a_pop_valid: assert property (@(posedge clk) disable iff (!rst_n) pop |-> sel_valid);
endmodule
