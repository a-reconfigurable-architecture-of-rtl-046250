// siso_decoder: sliding-window max-log-MAP soft-input soft-output decoder for
// one constituent code of the turbo code.
//
// The block of K trellis steps is cut into N = ceil(K/W) windows of W steps.
// Three state-metric recursion units work in parallel, as the published design
// describes: in period p (W clock cycles)
//   - the forward unit runs over window p and stores alpha_k in a two-bank
//     window buffer;
//   - the dummy-backward unit runs backward over window p+1 starting from
//     all-equal metrics, which yields a reliable starting beta for window p;
//   - the backward unit runs backward over window p-1, starting from the
//     dummy result of the previous period (or from all-equal metrics at the
//     end of the block), and combines its beta with the stored alpha in the
//     LLR unit to produce the extrinsic value of each step.
// A block therefore takes (N+1)*W cycles, about one trellis step per clock.
// The window length, the open (unterminated) end of the trellis and the
// initial forward metrics are this design's choices.
//
// Interface and timing: start with k_len (1..K_MAX) begins a block; busy stays
// high until done pulses. Branch inputs are read through three ports
// (addr_f/br_f forward, addr_d/br_d dummy, addr_b/br_b backward): the unit
// drives a step index and expects the branch values of that step in the same
// cycle (combinational read). Extrinsic outputs leave on ext_valid/ext_addr/
// ext_val, in reverse order within each window, one per cycle.
module siso_decoder
  import turbo_pkg::*;
#(
  parameter int unsigned K_MAX = 5114,
  parameter int unsigned W     = 32
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  kidx_t   k_len,
  output kidx_t   addr_f,
  input  branch_t br_f,
  output kidx_t   addr_d,
  input  branch_t br_d,
  output kidx_t   addr_b,
  input  branch_t br_b,
  output logic    ext_valid,
  output kidx_t   ext_addr,
  output ext_t    ext_val,
  output logic    busy,
  output logic    done
);

  localparam int unsigned NW_MAX = (K_MAX + W - 1) / W;
  localparam int unsigned PW     = $clog2(NW_MAX + 2);
  localparam int unsigned JW     = $clog2(W);

  typedef logic [PW-1:0] per_t;
  typedef logic [JW-1:0] j_t;

  per_t  nwin_q, p_q;
  j_t    j_q;
  kidx_t len_q;

  metrics_t alpha_q, dummy_q, beta_q;
  metrics_t alpha_nx, dummy_in, dummy_nx, beta_in, beta_nx;
  metrics_t alpha_init;
  metrics_t alpha_buf [2][W];

  logic f_act, d_act, b_act;
  kidx_t f_k, d_k, b_k, d_end, b_end, b_start;
  logic  b_last;

  // First step index of window w and the last step of window w.
  function automatic kidx_t win_start(per_t w);
    return kidx_t'(int'(w) * W);
  endfunction
  function automatic kidx_t win_end(per_t w, kidx_t len);
    kidx_t e;
    e = kidx_t'((int'(w) + 1) * W);
    return (e > len ? len : e) - 1'b1;
  endfunction

  always_comb begin
    for (int s = 0; s < NSTATES; s++)
      alpha_init[s] = (s == 0) ? metric_t'(0) : metric_t'(ALPHA_INIT_OTHER);
  end

  // Forward unit: window p.
  assign f_k   = win_start(p_q) + kidx_t'(j_q);
  assign f_act = busy && (p_q < nwin_q) && (f_k < len_q);
  // Dummy-backward unit: window p+1.
  assign d_end = win_end(p_q + 1'b1, len_q);
  assign d_k   = d_end - kidx_t'(j_q);
  assign d_act = busy && (p_q + 1'b1 < nwin_q) && (kidx_t'(j_q) <= d_end - win_start(p_q + 1'b1));
  // Backward unit: window p-1.
  assign b_start = win_start(p_q - 1'b1);
  assign b_end   = win_end(p_q - 1'b1, len_q);
  assign b_k     = b_end - kidx_t'(j_q);
  assign b_act   = busy && (p_q != '0) && (kidx_t'(j_q) <= b_end - b_start);
  assign b_last  = (p_q == nwin_q);

  assign addr_f = f_k;
  assign addr_d = d_k;
  assign addr_b = b_k;

  assign dummy_in = (j_q == '0) ? '0 : dummy_q;
  assign beta_in  = (j_q == '0) ? (b_last ? '0 : dummy_q) : beta_q;

  state_metric_unit #(.FORWARD(1'b1)) u_fwd   (.m_in(alpha_q),  .br(br_f), .m_out(alpha_nx));
  state_metric_unit #(.FORWARD(1'b0)) u_dummy (.m_in(dummy_in), .br(br_d), .m_out(dummy_nx));
  state_metric_unit #(.FORWARD(1'b0)) u_bwd   (.m_in(beta_in),  .br(br_b), .m_out(beta_nx));

  llr_unit u_llr (
    .alpha(alpha_buf[~p_q[0]][j_t'(b_k - b_start)]),
    .beta (beta_in),
    .lp   (br_b.lp),
    .ext  (ext_val)
  );

  assign ext_valid = b_act;
  assign ext_addr  = b_k;
  assign done      = busy && b_last && (j_q == j_t'(W - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      p_q     <= '0;
      j_q     <= '0;
      nwin_q  <= '0;
      len_q   <= '0;
      alpha_q <= '0;
      dummy_q <= '0;
      beta_q  <= '0;
    end else if (start) begin
      busy    <= 1'b1;
      p_q     <= '0;
      j_q     <= '0;
      len_q   <= k_len;
      nwin_q  <= per_t'((k_len + kidx_t'(W - 1)) / kidx_t'(W));
      alpha_q <= alpha_init;
      dummy_q <= '0;
      beta_q  <= '0;
    end else if (busy) begin
      if (f_act) alpha_q <= alpha_nx;
      if (d_act) dummy_q <= dummy_nx;
      else if (j_q == '0) dummy_q <= '0;
      if (b_act) beta_q <= beta_nx;
      if (j_q == j_t'(W - 1)) begin
        j_q <= '0;
        p_q <= p_q + 1'b1;
        if (done) busy <= 1'b0;
      end else begin
        j_q <= j_q + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (f_act) alpha_buf[p_q[0]][j_q] <= alpha_q;
  end

  // The three recursion units never run past the block.
  a_range: assert property (@(posedge clk) disable iff (!rst_n)
    (f_act -> f_k < len_q) && (d_act -> d_k < len_q) && (b_act -> b_k < len_q));

endmodule
