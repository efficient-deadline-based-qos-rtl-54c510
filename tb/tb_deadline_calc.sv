// tb_deadline_calc: directed cases for both deadline formulas, the max() with
// the previous deadline (also across clock wrap), the eligibility factor, and
// random cases against an integer model.
module tb_deadline_calc;
  import edf_pkg::*;
  localparam int EF = 2500;
  flow_cfg_t cfg;
  logic prev_valid;
  time_t prev_dl, t_now, dl, elig;
  logic [LEN_W-1:0] len;
  logic [15:0] parts;
  int checks = 0, failures = 0;

  deadline_calc #(.ELIG_FACTOR(EF)) dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s: dl=%0d elig=%0d", what, dl, elig); end
  endtask

  task automatic apply(dl_mode_e m, logic sm, int inv, int lat, logic pv, time_t pd, time_t tn,
                       int l, int pr);
    cfg = '0; cfg.mode = m; cfg.vc = VC_REG; cfg.smooth = sm; cfg.inv_bw = 16'(inv);
    cfg.frame_lat = time_t'(lat);
    prev_valid = pv; prev_dl = pd; t_now = tn; len = LEN_W'(l); parts = 16'(pr);
    #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // control traffic at link rate: 1/8 cycle per byte, 2048 bytes -> +256
    apply(DL_RATE, 0, 32, 0, 0, 0, 1000, 2048, 0);
    check(dl == 1256 && elig == 1000, "control, first packet");
    // previous deadline later than now: it is the base
    apply(DL_RATE, 0, 32, 0, 1, 5000, 1000, 1024, 0);
    check(dl == 5128, "rate, base = previous deadline");
    // previous deadline in the past: now is the base
    apply(DL_RATE, 0, 512, 0, 1, 900, 1000, 100, 0);
    check(dl == 1200, "rate, base = now, 2 cycles per byte");
    // video: 10 ms target at 125 MHz over 40 packets -> 31250 cycles each
    apply(DL_FRAME, 1, 0, 1250000, 1, 0, 7000, 2048, 40);
    check(dl == 7000 + 31250, "frame deadline");
    check(elig == 7000 + 31250 - EF, "eligible time = deadline - factor");
    // wrap: previous deadline just past the wrap is later than now
    apply(DL_RATE, 0, 256, 0, 1, 32'h0000_0010, 32'hFFFF_FFF0, 16, 0);
    check(dl == 32'h0000_0020, "max across wrap");
    for (int n = 0; n < 500; n++) begin
      int unsigned tn, pd, l, inv, lat, pr;
      longint exp_base, exp_dl;
      logic pv, sm, fm;
      tn = $urandom_range(0, 1 << 30); pd = tn + $urandom_range(0, 4000) - 2000;
      l = $urandom_range(1, 2048); inv = $urandom_range(0, 65535);
      lat = $urandom_range(0, 2000000); pr = $urandom_range(0, 100);
      pv = 1'($urandom); sm = 1'($urandom); fm = 1'($urandom);
      apply(dl_mode_e'(fm), sm, inv, lat, pv, pd, tn, l, pr);
      exp_base = (pv && int'(pd - tn) > 0) ? pd : tn;
      exp_dl = exp_base + (fm ? lat / (pr == 0 ? 1 : pr) : (l * inv) / 256);
      check(dl == time_t'(exp_dl), "random deadline");
      check(elig == (sm ? time_t'(exp_dl - EF) : time_t'(tn)), "random eligible time");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
