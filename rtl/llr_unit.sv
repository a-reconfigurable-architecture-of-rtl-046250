// llr_unit: extrinsic log-likelihood ratio of one trellis step, max-log
// approximation.
//
//   Le_k = max over branches with u=1 of (alpha_k(s') + p*lp + beta_{k+1}(s))
//        - max over branches with u=0 of (alpha_k(s') + p*lp + beta_{k+1}(s))
//
// The systematic and a-priori terms of the branch metric are left out, which
// makes the result the extrinsic part of the a-posteriori LLR
// (L = Ls + La + Le). The result is saturated to EXT_W bits. The published design
// states that max-log-MAP computes the a-posteriori probability of each bit;
// the extrinsic form and the saturation are this design's choice.
//
// Interface and timing: purely combinational.
module llr_unit
  import turbo_pkg::*;
(
  input  metrics_t alpha,
  input  metrics_t beta,
  input  llr_t     lp,
  output ext_t     ext
);

  localparam int SW = METRIC_W + 3;
  typedef logic signed [SW-1:0] wide_t;

  localparam wide_t EXT_MAX = wide_t'((1 << (EXT_W - 1)) - 1);
  localparam wide_t EXT_MIN = -EXT_MAX;

  wide_t best [2];
  wide_t cand, diff;

  always_comb begin
    best[0] = {1'b1, {(SW-1){1'b0}}};
    best[1] = {1'b1, {(SW-1){1'b0}}};
    for (int sp = 0; sp < NSTATES; sp++) begin
      for (int u = 0; u < 2; u++) begin
        cand = wide_t'(alpha[sp]) + wide_t'(beta[rsc_next(3'(sp), u[0])])
             + (rsc_parity(3'(sp), u[0]) ? wide_t'(lp) : wide_t'(0));
        if (cand > best[u]) best[u] = cand;
      end
    end
    diff = best[1] - best[0];
    if (diff > EXT_MAX)      ext = ext_t'(EXT_MAX);
    else if (diff < EXT_MIN) ext = ext_t'(EXT_MIN);
    else                     ext = ext_t'(diff);
  end

endmodule
