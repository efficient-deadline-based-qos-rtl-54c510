// desc_fifo: first-in first-out queue of packet descriptors.
//
// Used as the best-effort "common queue" of a port buffer and as the ordered
// and take-over queues of the regulated virtual channel. Storage is a plain
// array indexed by read and write pointers, so it maps onto a RAM. The head is
// visible combinationally on `head` while `empty` is low. Push and pop may
// happen in the same cycle. A push when full or a pop when empty is a usage
// error (flagged by assertions); flow control upstream prevents both.
// `tail` shows the most recently pushed descriptor still in the queue.
module desc_fifo
  import edf_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  pkt_t                     din,
  input  logic                     pop,
  output pkt_t                     head,
  output pkt_t                     tail,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  pkt_t          mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty = (count == '0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign head  = mem[rd_ptr];
  assign tail  = mem[(wr_ptr == '0) ? AW'(DEPTH - 1) : wr_ptr - 1'b1];

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + ($clog2(DEPTH+1))'(push) - ($clog2(DEPTH+1))'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule
