// tb_edf_port_buffer: VC allocation by header VC, absolute priority of VC0 at
// the MUX, VC1 offered when the VC0 head is not ready, per-VC occupancy, and
// the take-over path of VC0 through the port.
module tb_edf_port_buffer;
  import edf_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic push, pop;
  pkt_t din;
  logic [1:0] vc_ready, head_valid;
  pkt_t head_pkt [2];
  logic sel_valid;
  pkt_t sel_pkt;
  vc_e  sel_vc;
  logic [CRD_W-1:0] bytes_used [2];
  logic ev_takeover_enq, ev_takeover_win;
  int checks = 0, failures = 0;
  int n_enq = 0, n_win = 0;

  edf_port_buffer #(.DEPTH(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (ev_takeover_enq) n_enq++;
    if (ev_takeover_win) n_win++;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic put(pkt_t p);
    @(negedge clk); push = 1; din = p;
    @(posedge clk); #1 push = 0;
  endtask

  // take the offered packet and check it
  task automatic take(logic [1:0] rdy, logic exp_valid, vc_e exp_vc, time_t exp_dl);
    @(negedge clk); vc_ready = rdy; #1;
    check(sel_valid == exp_valid, "sel_valid");
    if (exp_valid) begin
      check(sel_vc == exp_vc, "sel_vc");
      check(sel_pkt.dl == exp_dl, "sel deadline");
      pop = 1;
    end
    @(posedge clk); #1 pop = 0; vc_ready = 2'b00;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = '0; vc_ready = 2'b00;
    repeat (2) @(posedge clk);
    rst_n = 1;
    put(mk_pkt(100, 1, 0, 0, VC_BE,  512, 5, 0));   // best effort, early deadline
    put(mk_pkt(300, 1, 0, 0, VC_REG, 256, 1, 0));
    put(mk_pkt(500, 1, 0, 0, VC_REG, 256, 1, 1));
    put(mk_pkt(400, 1, 0, 0, VC_REG, 64,  2, 0));   // order error -> take-over queue
    @(negedge clk);
    check(head_valid == 2'b11, "both VCs occupied");
    check(bytes_used[0] == 256 + 256 + 128, "VC0 bytes (64-byte packet charged 128)");
    check(bytes_used[1] == 512, "VC1 bytes");
    check(n_enq == 1, "one take-over enqueue");
    take(2'b11, 1, VC_REG, 300);       // VC0 first although VC1 deadline is earlier
    take(2'b10, 1, VC_BE, 100);        // VC0 head blocked: VC1 may go
    take(2'b01, 1, VC_REG, 400);       // take-over head beats ordered 500
    check(n_win == 1, "one take-over win");
    take(2'b10, 0, VC_REG, 0);         // only VC0 left and it is not ready
    take(2'b01, 1, VC_REG, 500);
    @(negedge clk);
    check(head_valid == 2'b00 && bytes_used[0] == 0 && bytes_used[1] == 0, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
