// tb_sorted_queue: random pushes (keys near a moving base, including wrap of
// the 32-bit time) and pops against a sorted-list model; equal keys must stay
// in push order.
module tb_sorted_queue;
  import edf_pkg::*;
  import tb_util_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic push, pop;
  time_t push_key, head_key;
  pkt_t push_pkt, head_pkt;
  logic empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  time_t mkey[$];
  pkt_t  mpkt[$];
  time_t base;

  sorted_queue #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; push_key = '0; push_pkt = '0;
    base = 32'hFFFF_FF00;   // keys cross the wrap point during the test
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int pos;
      @(negedge clk);
      check(count == mkey.size(), "count");
      check(empty == (mkey.size() == 0), "empty");
      if (mkey.size() > 0) begin
        check(head_key == mkey[0], "head key");
        check(head_pkt == mpkt[0], "head packet (stable order)");
      end
      pop  = ($urandom_range(0, 99) < 45) && mkey.size() > 0;
      push = ($urandom_range(0, 99) < 55) && (mkey.size() < DEPTH || pop);
      push_key = base + time_t'($urandom_range(0, 15));
      push_pkt = mk_pkt(push_key, 0, 0, 0, VC_REG, 64, 0, n);
      base = base + 1;
      @(posedge clk);
      #1;
      if (pop) begin void'(mkey.pop_front()); void'(mpkt.pop_front()); end
      if (push) begin
        pos = mkey.size();
        for (int i = 0; i < mkey.size(); i++)
          if ($signed(push_key - mkey[i]) < 0) begin pos = i; break; end
        mkey.insert(pos, push_key);
        mpkt.insert(pos, push_pkt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
