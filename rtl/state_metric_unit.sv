// state_metric_unit: one trellis step of the max-log-MAP state-metric
// recursion for all 8 states of the RSC code.
//
// FORWARD = 1 computes the forward recursion
//   alpha_{k+1}(s) = max over (s', u) with s = next(s', u) of alpha_k(s') + gamma_k(s', u)
// and FORWARD = 0 the backward recursion
//   beta_k(s')     = max over u of beta_{k+1}(next(s', u)) + gamma_k(s', u),
// the two add-compare-select recursions of the max-log-MAP algorithm. The
// branch metric is gamma = u * gsys + p * lp, with p the parity bit of the
// branch: using 0/1 rather than +-1/2 weights only adds the same constant to
// every branch of a step, which the max operation and the normalisation below
// remove. After the step the metric of state 0 is subtracted from all states
// so that the metrics stay bounded; LLRs use only differences, so they are
// unchanged. The equations are the published design's; gamma's form and the
// normalisation are this design's choice.
//
// Interface and timing: purely combinational, m_out follows m_in and br.
// Forward, backward and dummy-backward units of the SISO decoder are each one
// instance of this module plus a metric register.
module state_metric_unit
  import turbo_pkg::*;
#(
  parameter bit FORWARD = 1'b1
) (
  input  metrics_t m_in,
  input  branch_t  br,
  output metrics_t m_out
);

  localparam int SW = METRIC_W + 2;
  typedef logic signed [SW-1:0] wide_t;

  wide_t best [NSTATES];
  wide_t cand;
  logic [2:0] ns;

  always_comb begin
    for (int s = 0; s < NSTATES; s++) best[s] = {1'b1, {(SW-1){1'b0}}};
    for (int sp = 0; sp < NSTATES; sp++) begin
      for (int u = 0; u < 2; u++) begin
        ns   = rsc_next(3'(sp), u[0]);
        cand = (u[0] ? wide_t'(br.gsys) : wide_t'(0))
             + (rsc_parity(3'(sp), u[0]) ? wide_t'(br.lp) : wide_t'(0));
        if (FORWARD) begin
          cand = cand + wide_t'(m_in[sp]);
          if (cand > best[ns]) best[ns] = cand;
        end else begin
          cand = cand + wide_t'(m_in[ns]);
          if (cand > best[sp]) best[sp] = cand;
        end
      end
    end
    for (int s = 0; s < NSTATES; s++) m_out[s] = metric_t'(best[s] - best[0]);
  end

endmodule
