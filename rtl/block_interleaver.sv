// block_interleaver: address generator of the turbo code's block interleaver
// for block sizes K from 40 to 5114 bits.
//
// The block of K bits is written row by row into a matrix of ROWS rows and
// C = ceil(K / ROWS) columns and read out column by column; positions at or
// beyond K are pruned. The generator walks the read order and emits, for each
// interleaved position k = 0..K-1, the natural-order index pi(k) it reads.
// The same sequence drives the encoder's second RSC and, stored in a table,
// the decoder's interleaver and de-interleaver. The published design calls it a block
// interleaver and gives the block-size range; the row count and the plain
// row/column order (no intra-row permutation) are this design's choice.
//
// Interface and timing: a start pulse with K latches the size. From the next
// cycle one matrix position is visited per clock; valid is high when the
// position holds a bit (idx = k, addr = pi(k)) and low on a pruned position,
// which the user sees as a one-cycle stall. A valid address is held until
// ready is high (valid/ready handshake); pruned positions are skipped
// regardless. done is high with the last address. At most ROWS-1 positions are
// pruned, so with ready held high a block takes at most K+ROWS-1 cycles.
module block_interleaver
  import turbo_pkg::*;
#(
  parameter int unsigned ROWS = 20
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  kidx_t k_len,
  input  logic  ready,
  output logic  valid,
  output kidx_t idx,
  output kidx_t addr,
  output logic  done,
  output logic  busy
);

  localparam int unsigned RW = $clog2(ROWS);

  kidx_t         len_q, cols_q, col_q, pos_q;
  logic [RW-1:0] row_q;

  assign addr  = pos_q;
  assign valid = busy && (pos_q < len_q);
  assign done  = valid && (idx == len_q - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      len_q  <= '0;
      cols_q <= '0;
      col_q  <= '0;
      row_q  <= '0;
      pos_q  <= '0;
      idx    <= '0;
    end else if (start) begin
      busy   <= 1'b1;
      len_q  <= k_len;
      cols_q <= kidx_t'((k_len + kidx_t'(ROWS - 1)) / kidx_t'(ROWS));
      col_q  <= '0;
      row_q  <= '0;
      pos_q  <= '0;
      idx    <= '0;
    end else if (busy && (ready || !valid)) begin
      if (valid) idx <= idx + 1'b1;
      if (done) begin
        busy <= 1'b0;
      end else if (row_q == RW'(ROWS - 1)) begin
        row_q <= '0;
        col_q <= col_q + 1'b1;
        pos_q <= col_q + 1'b1;
      end else begin
        row_q <= row_q + 1'b1;
        pos_q <= pos_q + cols_q;
      end
    end
  end

  // Handshake rule: a valid address is held, unchanged, until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    valid && !ready && !start |=> valid && $stable(addr) && $stable(idx));

endmodule
