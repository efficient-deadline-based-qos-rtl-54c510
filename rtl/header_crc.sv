// header_crc: CRC over a packet header, recomputed at every transmitter.
//
// Because the time-to-destination field is rewritten at each hop, the header
// CRC has to be regenerated on every outgoing link and checked on every
// incoming one. The polynomial is this design's choice: CRC-16-CCITT
// (x^16 + x^12 + x^5 + 1), initial value 16'hFFFF, header bits fed MSB first
// (all pkt_t fields except the CRC itself). Purely combinational: `crc` is the
// CRC of `pkt` in the same cycle, `ok` says the CRC field of `pkt` matches.
module header_crc
  import edf_pkg::*;
(
  input  pkt_t             pkt,
  output logic [CRC_W-1:0] crc,
  output logic             ok
);
  localparam logic [15:0] POLY = 16'h1021;

  always_comb begin
    logic [HDR_W-1:0] hdr;
    logic [15:0]      c;
    logic             fb;
    hdr = pkt[$bits(pkt_t)-1 -: HDR_W];
    c   = 16'hFFFF;
    for (int i = HDR_W - 1; i >= 0; i--) begin
      fb = c[15] ^ hdr[i];
      c  = {c[14:0], 1'b0} ^ (fb ? POLY : 16'h0000);
    end
    crc = c;
    ok  = (pkt.crc == c);
  end
endmodule
