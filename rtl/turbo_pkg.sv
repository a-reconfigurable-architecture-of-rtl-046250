// turbo_pkg: types, widths and trellis functions shared by the turbo encoder
// and the max-log-MAP turbo decoder.
//
// The constituent code is the 8-state recursive systematic convolutional (RSC)
// code of the 3GPP turbo coder: feedback polynomial 1 + D^2 + D^3 and
// feed-forward polynomial 1 + D + D^3. A state is the 3-bit shift register
// {s1, s2, s3}, s1 being the most recent bit (bit 2 of the state vector).
// The polynomials are the standard 3GPP ones; the widths of the soft values
// (channel LLRs, extrinsic values, state metrics) are this design's choice.
//
// Soft values follow LLR = log(P(bit=1)/P(bit=0)): a positive value favours 1.
package turbo_pkg;

  localparam int unsigned NSTATES  = 8;   // 2^3 trellis states
  localparam int unsigned LLR_W    = 6;   // channel LLR width (signed)
  localparam int unsigned EXT_W    = 8;   // extrinsic LLR width (signed, saturated)
  localparam int unsigned BR_W     = 10;  // systematic + a-priori branch value width
  localparam int unsigned METRIC_W = 14;  // state metric width (signed, normalised)
  localparam int unsigned KW       = 13;  // bits of a block index, block sizes up to 5114

  // Forward metric of the states that the encoder cannot start in.
  localparam int ALPHA_INIT_OTHER = -256;

  typedef logic signed [LLR_W-1:0]    llr_t;
  typedef logic signed [EXT_W-1:0]    ext_t;
  typedef logic signed [METRIC_W-1:0] metric_t;
  typedef metric_t [NSTATES-1:0]      metrics_t;
  typedef logic [KW-1:0]              kidx_t;

  // Branch inputs of one trellis step: gsys = systematic LLR + a-priori LLR,
  // lp = parity LLR of the constituent code.
  typedef struct packed {
    logic signed [BR_W-1:0] gsys;
    llr_t                   lp;
  } branch_t;

  // Feedback bit that enters the shift register for input u in state s.
  function automatic logic rsc_fb(logic [2:0] s, logic u);
    return u ^ s[1] ^ s[0];
  endfunction

  // Parity output for input u in state s.
  function automatic logic rsc_parity(logic [2:0] s, logic u);
    logic a;
    a = rsc_fb(s, u);
    return a ^ s[2] ^ s[0];
  endfunction

  // Successor state for input u in state s.
  function automatic logic [2:0] rsc_next(logic [2:0] s, logic u);
    return {rsc_fb(s, u), s[2], s[1]};
  endfunction

endpackage
