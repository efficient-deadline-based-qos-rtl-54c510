// tb_edf_vc0_buffer: first the order-error example (deadlines 7, 12 then 11:
// 11 must enter the take-over queue and leave before 12), then random traffic
// from several flows, each with increasing deadlines, checked against a model
// of the two-queue enqueue/dequeue rules, plus per-flow order and occupancy.
module tb_edf_vc0_buffer;
  import edf_pkg::*;
  import tb_util_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic push, pop;
  pkt_t din, head;
  logic head_valid, head_from_u, enq_to_u;
  logic [CRD_W-1:0] bytes_used;
  int checks = 0, failures = 0;
  pkt_t ql[$], qu[$];
  int   last_seq_out [4];
  int   bytes_model;
  int   n_to_u, n_u_win;

  edf_vc0_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic model_from_u();
    if (qu.size() == 0) return 0;
    if (ql.size() == 0) return 1;
    return $signed(qu[0].dl - ql[0].dl) < 0;
  endfunction

  // one cycle: optional push of p, optional pop; model updated alongside
  task automatic step(logic do_push, pkt_t p, logic do_pop);
    logic fu, to_u;
    @(negedge clk);
    check(head_valid == (ql.size() + qu.size() > 0), "head_valid");
    fu = model_from_u();
    if (head_valid) begin
      check(head == (fu ? qu[0] : ql[0]), "head = smaller deadline of the two heads");
      check(head_from_u == fu, "head_from_u");
    end
    check(bytes_used == CRD_W'(bytes_model), "bytes_used");
    push = do_push; din = p; pop = do_pop && head_valid;
    to_u = do_push && ql.size() > 0 && !(pop && !fu && ql.size() == 1)
           && $signed(p.dl - ql[$].dl) < 0;
    #1;
    if (do_push) check(enq_to_u == to_u, "queue allocation");
    @(posedge clk);
    #1;
    if (pop) begin
      pkt_t o;
      if (fu) begin o = qu.pop_front(); n_u_win++; end else o = ql.pop_front();
      check(int'(o.seq) > last_seq_out[o.flow], "per-flow order kept");
      last_seq_out[o.flow] = o.seq;
      bytes_model -= int'(crd_bytes(o.len));
    end
    if (do_push) begin
      if (to_u) begin qu.push_back(p); n_to_u++; end else ql.push_back(p);
      bytes_model += int'(crd_bytes(p.len));
    end
    push = 0; pop = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time_t fdl [4];
    int    fseq [4];
    pkt_t  o;
    push = 0; pop = 0; din = '0; bytes_model = 0; n_to_u = 0; n_u_win = 0;
    for (int i = 0; i < 4; i++) begin last_seq_out[i] = -1; fdl[i] = 0; fseq[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // order-error example: 7 and 12 from the video flow, then 11 from control
    step(1, mk_pkt(7,  0, 0, 0, VC_REG, 256, 0, 0), 0);
    step(1, mk_pkt(12, 0, 0, 0, VC_REG, 256, 0, 1), 0);
    step(1, mk_pkt(11, 0, 0, 0, VC_REG, 128, 1, 0), 0);
    check(ql.size() == 2 && qu.size() == 1, "11 went to the take-over queue");
    @(negedge clk); check(head.dl == 7, "7 first");
    step(0, '0, 1);
    @(negedge clk); check(head.dl == 11 && head_from_u, "11 overtakes 12");
    step(0, '0, 1);
    @(negedge clk); check(head.dl == 12, "12 last");
    step(0, '0, 1);
    check(!head_valid, "empty");
    for (int i = 0; i < 4; i++) last_seq_out[i] = -1;
    // random flows with increasing deadlines, different rates
    for (int n = 0; n < 4000; n++) begin
      int fl;
      logic dp;
      fl = $urandom_range(0, 3);
      dp = ($urandom_range(0, 99) < 50) && (ql.size() + qu.size() < DEPTH);
      fdl[fl] = fdl[fl] + time_t'($urandom_range(1, 40 * (fl + 1)));
      o = mk_pkt(fdl[fl], 0, 0, 0, VC_REG, $urandom_range(64, 2048), fl, fseq[fl]);
      if (dp) fseq[fl]++;
      step(dp, o, $urandom_range(0, 99) < 48);
    end
    check(n_to_u > 10, "take-over queue used");
    check(n_u_win > 10, "take-over head sent first");
    $display("take-over enqueues %0d, take-over wins %0d", n_to_u, n_u_win);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
