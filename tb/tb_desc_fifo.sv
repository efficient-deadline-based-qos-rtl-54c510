// tb_desc_fifo: random push/pop traffic against a queue model; checks head,
// tail, count, empty and full every cycle.
module tb_desc_fifo;
  import edf_pkg::*;
  import tb_util_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic push, pop;
  pkt_t din, head, tail;
  logic empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  pkt_t model[$];

  desc_fifo #(.DEPTH(DEPTH)) dut (.*);

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
    push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      check(count == model.size(), "count");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      if (model.size() > 0) begin
        check(head == model[0], "head");
        check(tail == model[$], "tail");
      end
      push = ($urandom_range(0, 99) < (n < 1000 ? 60 : 40)) && (model.size() < DEPTH || pop);
      pop  = ($urandom_range(0, 99) < 50) && model.size() > 0;
      if (model.size() == DEPTH && !pop) push = 0;
      din  = mk_pkt($urandom, $urandom_range(0, 127), 0, 0, vc_e'($urandom_range(0, 1)),
                    $urandom_range(1, 2048), 0, n);
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
