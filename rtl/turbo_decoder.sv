// turbo_decoder: iterative max-log-MAP turbo decoder for the rate-1/3 turbo
// code, block sizes 40..K_MAX.
//
// Structure (after the published decoder block diagram): SISO decoder 1 works on the
// received systematic values S' and parities P1' in natural order, with the
// de-interleaved extrinsic output of SISO decoder 2 as a-priori input. SISO
// decoder 2 works on the interleaved systematic values and the parities P2',
// with the interleaved extrinsic output of SISO decoder 1 as a-priori input.
// Interleaving and de-interleaving are done by address: a table pi(k), filled
// by the block interleaver while the block is being loaded, maps each
// interleaved position to its natural index; SISO 2 reads S' and the SISO 1
// extrinsic at pi(k) and writes its extrinsic back at pi(k). After the last
// iteration the a-posteriori value L = S' + Le1 + Le2 of each bit passes a hard
// decision (the slicer producing uK). The two SISO decoders run one after the
// other, each half-iteration taking (ceil(K/W)+1)*W cycles. The iteration
// count (n_iter input), the memory organisation and the handshakes are this
// design's choice.
//
// Interface and timing: start with k_len and n_iter (1..15) opens a block.
// The K received triples (in_sys, in_p1, in_p2, channel LLRs, positive meaning
// 1) are then taken on in_valid, one per cycle at most, while in_ready is high.
// After n_iter iterations the decoded bits leave in natural order, one per
// cycle, on out_valid/out_idx/out_bit with the soft value out_llr; out_last
// marks the last. busy is high from start until the last output bit.
module turbo_decoder
  import turbo_pkg::*;
#(
  parameter int unsigned K_MAX = 5114,
  parameter int unsigned W     = 32,
  parameter int unsigned ROWS  = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  kidx_t       k_len,
  input  logic [3:0]  n_iter,
  input  logic        in_valid,
  input  llr_t        in_sys,
  input  llr_t        in_p1,
  input  llr_t        in_p2,
  output logic        in_ready,
  output logic        out_valid,
  output kidx_t       out_idx,
  output logic        out_bit,
  output logic signed [BR_W:0] out_llr,
  output logic        out_last,
  output logic        busy,
  output logic [3:0]  iter_count
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_START1, S_RUN1, S_START2, S_RUN2, S_OUT
  } state_e;
  state_e state_q;

  // Block memories: channel values, extrinsic values, interleaver table.
  llr_t  ls_mem [K_MAX];
  llr_t  p1_mem [K_MAX];
  llr_t  p2_mem [K_MAX];
  ext_t  e1_mem [K_MAX];
  ext_t  e2_mem [K_MAX];
  kidx_t pi_mem [K_MAX];

  kidx_t len_q, cnt_q;
  logic [3:0] niter_q;
  logic  loaded_q, pi_ready_q;

  // Interleaver table generation.
  logic  il_valid, il_done, il_busy;
  kidx_t il_idx, il_addr;

  block_interleaver #(.ROWS(ROWS)) u_il (
    .clk, .rst_n,
    .start(start && state_q == S_IDLE), .k_len, .ready(1'b1),
    .valid(il_valid), .idx(il_idx), .addr(il_addr), .done(il_done), .busy(il_busy)
  );

  // SISO decoders.
  logic    half2;
  kidx_t   a1 [3], a2 [3];
  branch_t br [3];
  logic    s1_start, s2_start, s1_busy, s2_busy, s1_done, s2_done;
  logic    s1_xv, s2_xv;
  kidx_t   s1_xa, s2_xa;
  ext_t    s1_xe, s2_xe;

  assign half2    = (state_q == S_START2) || (state_q == S_RUN2);
  assign s1_start = (state_q == S_START1);
  assign s2_start = (state_q == S_START2);

  siso_decoder #(.K_MAX(K_MAX), .W(W)) u_siso1 (
    .clk, .rst_n, .start(s1_start), .k_len(len_q),
    .addr_f(a1[0]), .br_f(br[0]), .addr_d(a1[1]), .br_d(br[1]), .addr_b(a1[2]), .br_b(br[2]),
    .ext_valid(s1_xv), .ext_addr(s1_xa), .ext_val(s1_xe), .busy(s1_busy), .done(s1_done)
  );
  siso_decoder #(.K_MAX(K_MAX), .W(W)) u_siso2 (
    .clk, .rst_n, .start(s2_start), .k_len(len_q),
    .addr_f(a2[0]), .br_f(br[0]), .addr_d(a2[1]), .br_d(br[1]), .addr_b(a2[2]), .br_b(br[2]),
    .ext_valid(s2_xv), .ext_addr(s2_xa), .ext_val(s2_xe), .busy(s2_busy), .done(s2_done)
  );

  // Branch values of the three read ports of whichever SISO is running.
  always_comb begin
    for (int i = 0; i < 3; i++) begin
      kidx_t a, n;
      a = half2 ? a2[i] : a1[i];
      n = half2 ? pi_mem[a] : a;
      br[i].gsys = BR_W'(ls_mem[n]) + (half2 ? BR_W'(e1_mem[n]) : BR_W'(e2_mem[n]));
      br[i].lp   = half2 ? p2_mem[a] : p1_mem[a];
    end
  end

  // Hard decision on the a-posteriori value.
  assign out_llr   = (BR_W+1)'(ls_mem[cnt_q]) + (BR_W+1)'(e1_mem[cnt_q]) + (BR_W+1)'(e2_mem[cnt_q]);
  assign out_bit   = (out_llr > 0);
  assign out_valid = (state_q == S_OUT);
  assign out_idx   = cnt_q;
  assign out_last  = out_valid && (cnt_q == len_q - 1'b1);
  assign in_ready  = (state_q == S_LOAD) && !loaded_q;
  assign busy      = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      len_q      <= '0;
      cnt_q      <= '0;
      niter_q    <= '0;
      iter_count <= '0;
      loaded_q   <= 1'b0;
      pi_ready_q <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q    <= S_LOAD;
          len_q      <= k_len;
          niter_q    <= (n_iter == '0) ? 4'd1 : n_iter;
          iter_count <= '0;
          cnt_q      <= '0;
          loaded_q   <= 1'b0;
          pi_ready_q <= 1'b0;
        end
        S_LOAD: begin
          if (in_ready && in_valid) begin
            cnt_q <= cnt_q + 1'b1;
            if (cnt_q == len_q - 1'b1) loaded_q <= 1'b1;
          end
          if (il_done) pi_ready_q <= 1'b1;
          if (loaded_q && pi_ready_q) state_q <= S_START1;
        end
        S_START1: state_q <= S_RUN1;
        S_RUN1:   if (s1_done) state_q <= S_START2;
        S_START2: state_q <= S_RUN2;
        S_RUN2:   if (s2_done) begin
          iter_count <= iter_count + 1'b1;
          if (iter_count + 1'b1 == niter_q) begin
            state_q <= S_OUT;
            cnt_q   <= '0;
          end else begin
            state_q <= S_START1;
          end
        end
        S_OUT: begin
          cnt_q <= cnt_q + 1'b1;
          if (out_last) state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Memory writes: channel values and cleared extrinsic values while loading,
  // interleaver table while it is generated, extrinsic values while decoding
  // (SISO 2 writes through the de-interleaver address pi(k)).
  always_ff @(posedge clk) begin
    if (in_ready && in_valid) begin
      ls_mem[cnt_q] <= in_sys;
      p1_mem[cnt_q] <= in_p1;
      p2_mem[cnt_q] <= in_p2;
    end
    if (in_ready && in_valid) e1_mem[cnt_q] <= '0;
    else if (s1_xv)           e1_mem[s1_xa] <= s1_xe;
    if (in_ready && in_valid) e2_mem[cnt_q] <= '0;
    else if (s2_xv)           e2_mem[pi_mem[s2_xa]] <= s2_xe;
    if (il_valid) pi_mem[il_idx] <= il_addr;
  end

  // The two SISO decoders take turns, and decoding starts only after the
  // interleaver table is complete.
  a_one_siso: assert property (@(posedge clk) disable iff (!rst_n) !(s1_busy && s2_busy));
  a_table:    assert property (@(posedge clk) disable iff (!rst_n) s1_start |-> !il_busy);

endmodule
