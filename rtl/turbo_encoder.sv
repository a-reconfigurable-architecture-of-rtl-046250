// turbo_encoder: rate-1/3 turbo encoder built from two RSC encoders and a
// block interleaver.
//
// For every input bit it emits three bits: the systematic bit S, the parity P1
// of RSC1 that codes the block in natural order, and the parity P2 of RSC2
// that codes the interleaved block. This structure follows the published encoder
// diagram; the load-then-encode buffering is this design's choice,
// since RSC2 needs bits from anywhere in the block.
//
// Interface and timing: start (with k_len, 40..K_MAX) opens a block. The K
// information bits then arrive on in_valid/in_bit, one per cycle at most,
// and are stored. When the last bit is in, the interleaver starts and the
// encoded triples leave on out_valid/out_sys/out_p1/out_p2 in order k = 0..K-1,
// one per cycle except for the interleaver's pruning stalls; out_last marks
// the final triple. A triple is held until out_ready is high (valid/ready
// handshake). in_ready is high while input bits are accepted.
// No trellis termination (tail bits) is produced.
module turbo_encoder
  import turbo_pkg::*;
#(
  parameter int unsigned K_MAX = 5114,
  parameter int unsigned ROWS  = 20
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  kidx_t k_len,
  input  logic  in_valid,
  input  logic  in_bit,
  output logic  in_ready,
  output logic  out_valid,
  input  logic  out_ready,
  output logic  out_sys,
  output logic  out_p1,
  output logic  out_p2,
  output logic  out_last,
  output logic  busy
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_ENCODE} state_e;
  state_e state_q;

  logic [K_MAX-1:0] buf_q;
  kidx_t len_q, wr_q;

  logic  il_start, il_valid, il_done, il_busy;
  kidx_t il_idx, il_addr;

  logic u1, u2;

  assign in_ready = (state_q == S_LOAD);
  assign busy     = (state_q != S_IDLE);
  assign il_start = in_ready && in_valid && (wr_q == len_q - 1'b1);

  block_interleaver #(.ROWS(ROWS)) u_il (
    .clk, .rst_n,
    .start(il_start), .k_len(len_q), .ready(out_ready),
    .valid(il_valid), .idx(il_idx), .addr(il_addr), .done(il_done), .busy(il_busy)
  );

  assign u1 = buf_q[il_idx];
  assign u2 = buf_q[il_addr];

  rsc_encoder u_rsc1 (
    .clk, .rst_n, .clear(start), .en(il_valid && out_ready), .u(u1), .parity(out_p1), .state()
  );
  rsc_encoder u_rsc2 (
    .clk, .rst_n, .clear(start), .en(il_valid && out_ready), .u(u2), .parity(out_p2), .state()
  );

  assign out_valid = (state_q == S_ENCODE) && il_valid;
  assign out_sys   = u1;
  assign out_last  = out_valid && il_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      len_q   <= '0;
      wr_q    <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_LOAD;
          len_q   <= k_len;
          wr_q    <= '0;
        end
        S_LOAD: if (in_valid) begin
          wr_q <= wr_q + 1'b1;
          if (il_start) state_q <= S_ENCODE;
        end
        S_ENCODE: if (il_done && out_ready) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (in_ready && in_valid) buf_q[wr_q] <= in_bit;
  end

  // Handshake rules: a triple is held, unchanged, until it is taken, and no
  // triple is offered outside the encoding phase.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready && !start |=> out_valid && $stable({out_sys, out_p1, out_p2, out_last}));
  a_phase: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> state_q == S_ENCODE);
  a_il:    assert property (@(posedge clk) disable iff (!rst_n)
    state_q == S_ENCODE |-> il_busy);

endmodule
