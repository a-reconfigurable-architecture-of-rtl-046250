// bloom_filter: counting Bloom filter over block addresses that missed in the
// cache.
//
// Each inserted address increments NHASH saturating counters, one per hash
// function; a query returns the smallest of its counters, an upper estimate of
// how often the address has missed (0 means "never missed", with certainty).
// The hybrid cache uses this estimate to recognise blocks that miss again and
// again. The published design names the Bloom filter and its role; the counting form,
// the sizes and the hash functions (XOR folds of the address) are this
// design's choice.
//
// Interface and timing: query is combinational (q_addr -> q_count). ins_valid
// inserts ins_addr at the clock edge; clear empties the filter (synchronous).
// All counters are zero after reset.
module bloom_filter #(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned IDX_W  = 8,   // 2^IDX_W counters
  parameter int unsigned CNT_W  = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              ins_valid,
  input  logic [ADDR_W-1:0] ins_addr,
  input  logic [ADDR_W-1:0] q_addr,
  output logic [CNT_W-1:0]  q_count
);

  localparam int unsigned NCNT = 1 << IDX_W;

  logic [CNT_W-1:0] cnt_q [NCNT];

  // Two hash functions: XOR fold of the address, and XOR fold of the address
  // rotated by half an index with a constant mixed in.
  function automatic logic [IDX_W-1:0] hash(logic [ADDR_W-1:0] a, logic sel);
    logic [IDX_W-1:0] h;
    logic [ADDR_W-1:0] x;
    x = sel ? ((a << (IDX_W / 2)) | (a >> (ADDR_W - IDX_W / 2))) : a;
    h = sel ? IDX_W'(8'h5a) : '0;
    for (int i = 0; i < ADDR_W; i += IDX_W) h ^= IDX_W'(x >> i);
    return h;
  endfunction

  logic [IDX_W-1:0] qh0, qh1, ih0, ih1;

  assign qh0 = hash(q_addr, 1'b0);
  assign qh1 = hash(q_addr, 1'b1);
  assign ih0 = hash(ins_addr, 1'b0);
  assign ih1 = hash(ins_addr, 1'b1);
  assign q_count = (cnt_q[qh0] < cnt_q[qh1]) ? cnt_q[qh0] : cnt_q[qh1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCNT; i++) cnt_q[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < NCNT; i++) cnt_q[i] <= '0;
    end else if (ins_valid) begin
      if (cnt_q[ih0] != '1) cnt_q[ih0] <= cnt_q[ih0] + 1'b1;
      if (ih1 != ih0 && cnt_q[ih1] != '1) cnt_q[ih1] <= cnt_q[ih1] + 1'b1;
    end
  end

endmodule
