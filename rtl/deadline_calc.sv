// deadline_calc: deadline and eligible-time stamping of a packet at its host.
//
// For a rate-based flow the deadline is
//     D(P_i) = max(D(P_i-1), T_now) + L(P_i) / BW_avg
// where 1/BW_avg is held per flow as cycles per byte in unsigned Q8.8
// (control traffic uses the link rate, 1/8 cycle per byte, which gives it the
// earliest deadlines). For a frame-based (video) flow the increment is the
// target frame latency divided by the number of packets the frame produces:
//     D(P_i) = max(D(P_i-1), T_now) + latency / Parts(F_i).
// The eligible time of a smoothed flow is its deadline minus the eligibility
// factor ELIG_FACTOR; a flow that is not smoothed is eligible at once (T_now).
// `prev_valid` low means the flow has sent nothing yet, so D(P_i-1) is ignored.
// Purely combinational; max() and all comparisons are modulo 2**TIME_W.
// The Q8.8 format and the truncating division are this design's choices.
module deadline_calc
  import edf_pkg::*;
#(
  parameter int ELIG_FACTOR = 2500   // 20 us at 125 MHz
) (
  input  flow_cfg_t        cfg,
  input  logic             prev_valid,
  input  time_t            prev_dl,
  input  time_t            t_now,
  input  logic [LEN_W-1:0] len,
  input  logic [15:0]      parts,
  output time_t            dl,
  output time_t            elig
);
  time_t                 base;
  time_t                 inc;
  logic [LEN_W+16-1:0]   prod;
  logic [15:0]           parts_nz;

  always_comb begin
    base     = (prev_valid && dl_lt(t_now, prev_dl)) ? prev_dl : t_now;
    prod     = len * cfg.inv_bw;
    parts_nz = (parts == '0) ? 16'd1 : parts;
    if (cfg.mode == DL_FRAME) inc = cfg.frame_lat / TIME_W'(parts_nz);
    else                      inc = TIME_W'(prod >> 8);
    dl   = base + inc;
    elig = cfg.smooth ? dl - TIME_W'(ELIG_FACTOR) : t_now;
  end
endmodule
