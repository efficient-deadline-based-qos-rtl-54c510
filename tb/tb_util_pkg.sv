// tb_util_pkg: helpers shared by the testbenches. The header CRC reference
// here is computed by polynomial long division of the augmented message, a
// different formulation from the shift-register loop of the RTL, so the two
// check each other.
package tb_util_pkg;
  import edf_pkg::*;

  // CRC-16-CCITT, init 0xFFFF, MSB first, over the header bits without CRC.
  // Long division: remainder of (M * x^16) xor (0xFFFF * x^n) by 0x11021.
  function automatic logic [15:0] ref_crc(pkt_t p);
    logic [HDR_W+15:0] m;
    logic [HDR_W-1:0]  hdr;
    hdr = p[$bits(pkt_t)-1 -: HDR_W];
    m = {hdr, 16'h0000};
    m[HDR_W+15 -: 16] = m[HDR_W+15 -: 16] ^ 16'hFFFF;
    for (int i = HDR_W + 15; i >= 16; i--)
      if (m[i]) m[i -: 17] = m[i -: 17] ^ 17'h11021;
    return m[15:0];
  endfunction

  function automatic pkt_t mk_pkt(time_t dl, int dest, int src, int up_sel, vc_e vc,
                                  int len, int flow, int seq);
    pkt_t p;
    p        = '0;
    p.dl     = dl;
    p.dest   = NODE_W'(dest);
    p.src    = NODE_W'(src);
    p.up_sel = ROUTE_W'(up_sel);
    p.vc     = vc;
    p.len    = LEN_W'(len);
    p.flow   = FLOW_W'(flow);
    p.seq    = SEQ_W'(seq);
    p.crc    = '0;
    return p;
  endfunction

  function automatic pkt_t with_crc(pkt_t p);
    pkt_t q;
    q = p;
    q.crc = ref_crc(p);
    return q;
  endfunction
endpackage
