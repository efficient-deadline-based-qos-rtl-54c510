// tb_header_crc: compares the CRC with a long-division reference on random
// headers, and checks that any single flipped header bit is detected.
module tb_header_crc;
  import edf_pkg::*;
  import tb_util_pkg::*;
  pkt_t pkt;
  logic [CRC_W-1:0] crc;
  logic ok;
  int checks = 0, failures = 0;

  header_crc dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      pkt_t p;
      int b;
      p = mk_pkt($urandom, $urandom_range(0, 127), $urandom_range(0, 127), $urandom_range(0, 7),
                 vc_e'($urandom_range(0, 1)), $urandom_range(1, 2048), $urandom_range(0, 255), $urandom);
      pkt = p;
      #1;
      check(crc == ref_crc(p), "crc value");
      pkt = with_crc(p);
      #1;
      check(ok, "ok on correct crc");
      b = $urandom_range(CRC_W, $bits(pkt_t) - 1);
      pkt[b] = ~pkt[b];
      #1;
      check(!ok, "single bit error detected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
