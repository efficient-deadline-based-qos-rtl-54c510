// edf_vc0_buffer: the regulated virtual channel of a switch port, built from
// two FIFOs so that packets can overtake a late packet without a sorted buffer.
//
// Queue allocation (enqueue): if the ordered queue (L) is empty the packet goes
// there; otherwise its deadline is compared with the deadline of the packet at
// the tail of L. A deadline later than or equal to that tail goes to L, an
// earlier one to the take-over queue (U). L therefore stays in deadline order,
// and its tail always holds the latest deadline in the whole channel.
// Dequeue: the packet offered at `head` is the one with the smaller deadline of
// the two queue heads (L wins a tie); with only L occupied it is L's head.
// Per flow this never reorders packets. Only the offered head is ever checked
// for credits by the consumer.
//
// Both queues may each hold the whole channel's worth of descriptors (DEPTH),
// so neither fills while the other has room; total occupancy is bounded by the
// credits of the upstream sender, and `bytes_used` reports it in bytes.
// Timing: `head`/`head_valid` are combinational from queue state; `pop`
// removes the offered head at the clock edge; push and pop may coincide.
// A pop that empties L in the same cycle as a push is treated as L empty, so
// the new packet goes to L (at that point U is necessarily empty too).
module edf_vc0_buffer
  import edf_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  pkt_t             din,
  input  logic             pop,
  output logic             head_valid,
  output pkt_t             head,
  output logic             head_from_u,   // offered head is the take-over queue's
  output logic             enq_to_u,      // this push is steered to the take-over queue
  output logic [CRD_W-1:0] bytes_used
);
  localparam int CW = $clog2(DEPTH+1);

  pkt_t          l_head, l_tail, u_head, u_tail_unused;
  logic          l_empty, l_full, u_empty, u_full;
  logic [CW-1:0] l_count, u_count;
  logic          l_push, u_push, l_pop, u_pop;
  logic          l_drains;

  assign l_drains = pop && !head_from_u && (l_count == CW'(1));
  assign enq_to_u = push && !l_empty && !l_drains && dl_lt(din.dl, l_tail.dl);
  assign l_push   = push && !enq_to_u;
  assign u_push   = enq_to_u;

  always_comb begin
    head_valid  = !l_empty || !u_empty;
    head_from_u = !u_empty && (l_empty || dl_lt(u_head.dl, l_head.dl));
    head        = head_from_u ? u_head : l_head;
  end

  assign l_pop = pop && !head_from_u;
  assign u_pop = pop &&  head_from_u;

  desc_fifo #(.DEPTH(DEPTH)) u_ordered (
    .clk, .rst_n, .push(l_push), .din, .pop(l_pop),
    .head(l_head), .tail(l_tail), .empty(l_empty), .full(l_full), .count(l_count)
  );

  desc_fifo #(.DEPTH(DEPTH)) u_takeover (
    .clk, .rst_n, .push(u_push), .din, .pop(u_pop),
    .head(u_head), .tail(u_tail_unused), .empty(u_empty), .full(u_full), .count(u_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bytes_used <= '0;
    else bytes_used <= bytes_used + (push ? crd_bytes(din.len) : '0) - (pop ? crd_bytes(head.len) : '0);
  end

  // Lemma: the take-over queue is never occupied while the ordered queue is empty.
  a_u_implies_l: assert property (@(posedge clk) disable iff (!rst_n) !u_empty |-> !l_empty);
  a_pop_valid:   assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);
endmodule
