// hybrid_llc: hybrid last-level cache that retains blocks which miss again and
// again.
//
// Two tag-and-data stores are looked up together. The main store is a
// conventional direct-mapped cache of SETS lines. The retention store holds
// NRET lines, fully associative, for blocks that have been recognised as
// recurrently missed. Every miss is recorded in a counting Bloom filter. When
// a refill evicts a valid line from the main store, the Bloom filter is read
// with the victim's address; its estimated miss count is compared with the
// lowest priority held in the priority heap. If the victim has missed more
// often, it is written into the retention store in the heap's lowest-priority
// slot, with its miss count as priority; otherwise it is dropped. A hit in the
// retention store raises that line's priority. Blocks that thrash the main
// store therefore survive in the retention store instead of being refetched.
//
// What follows the published design: the two tag-and-data stores, the Bloom filter
// written on misses and read for a victim, the compare of Bloom filter and heap
// outputs that decides the write into the second store and the heap, and the
// two data outputs. This design's own choices: read-only operation with
// one-word lines, direct mapping of the main store, the sizes, the counting
// Bloom filter and the replacement rule above. The published design's tri-state output
// buffers are ordinary multiplexers here.
//
// Interface and timing: a request (req_valid && req_ready) with req_addr is
// looked up in the next cycle; a hit answers then (resp_valid, resp_data,
// resp_hit_main or resp_hit_ret), two cycles after the request. A miss issues
// mem_req_valid/mem_req_addr (held until mem_req_ready) to the next memory
// level and answers in the cycle after mem_resp_valid with the returned word.
// One request is served at a time.
module hybrid_llc #(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned SETS   = 64,
  parameter int unsigned NRET   = 8,
  parameter int unsigned PRIO_W = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  // Requests from the decoder side.
  input  logic              req_valid,
  input  logic [ADDR_W-1:0] req_addr,
  output logic              req_ready,
  output logic              resp_valid,
  output logic [DATA_W-1:0] resp_data,
  output logic              resp_hit_main,
  output logic              resp_hit_ret,
  // Next memory level.
  output logic              mem_req_valid,
  output logic [ADDR_W-1:0] mem_req_addr,
  input  logic              mem_req_ready,
  input  logic              mem_resp_valid,
  input  logic [DATA_W-1:0] mem_resp_data,
  // Event counters for observation.
  output logic [15:0]       n_retained
);

  localparam int unsigned IW = $clog2(SETS);
  localparam int unsigned TW = ADDR_W - IW;
  localparam int unsigned RW = $clog2(NRET);

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_MEMREQ, S_MEMWAIT, S_REFILL} state_e;
  state_e state_q;

  // Main store.
  logic [TW-1:0]     m_tag  [SETS];
  logic [DATA_W-1:0] m_data [SETS];
  logic [SETS-1:0]   m_vld;
  // Retention store.
  logic [ADDR_W-1:0] r_tag  [NRET];
  logic [DATA_W-1:0] r_data [NRET];
  logic [NRET-1:0]   r_vld;

  logic [ADDR_W-1:0] addr_q;
  logic [DATA_W-1:0] fill_q;
  logic [IW-1:0]     idx;
  logic [TW-1:0]     tag;

  assign idx = addr_q[IW-1:0];
  assign tag = addr_q[ADDR_W-1:IW];

  // Lookup in both stores.
  logic          hit_m, hit_r;
  logic [RW-1:0] hit_slot;
  assign hit_m = m_vld[idx] && (m_tag[idx] == tag);
  always_comb begin
    hit_r    = 1'b0;
    hit_slot = '0;
    for (int i = 0; i < NRET; i++)
      if (r_vld[i] && r_tag[i] == addr_q) begin
        hit_r    = 1'b1;
        hit_slot = RW'(i);
      end
  end

  // Victim of a refill, Bloom filter estimate and heap root.
  logic [ADDR_W-1:0] victim_addr;
  logic              victim_vld;
  logic [PRIO_W-1:0] victim_cnt, min_prio;
  logic [RW-1:0]     min_slot;
  logic              retain;

  assign victim_addr = {m_tag[idx], idx};
  assign victim_vld  = m_vld[idx];

  bloom_filter #(.ADDR_W(ADDR_W), .IDX_W(8), .CNT_W(PRIO_W)) u_bloom (
    .clk, .rst_n, .clear(1'b0),
    .ins_valid(state_q == S_LOOKUP && !hit_m && !hit_r), .ins_addr(addr_q),
    .q_addr(victim_addr), .q_count(victim_cnt)
  );

  // Compare: retain the victim if it missed more often than the weakest
  // retained block.
  assign retain = (state_q == S_REFILL) && victim_vld && (victim_cnt > min_prio);

  priority_heap #(.NSLOT(NRET), .PRIO_W(PRIO_W)) u_heap (
    .clk, .rst_n,
    .wr_valid(retain), .wr_slot(min_slot), .wr_prio(victim_cnt),
    .bump(state_q == S_LOOKUP && hit_r && !hit_m), .bump_slot(hit_slot),
    .min_slot, .min_prio
  );

  assign req_ready     = (state_q == S_IDLE);
  assign mem_req_valid = (state_q == S_MEMREQ);
  assign mem_req_addr  = addr_q;

  always_comb begin
    resp_valid    = 1'b0;
    resp_data     = fill_q;
    resp_hit_main = 1'b0;
    resp_hit_ret  = 1'b0;
    if (state_q == S_LOOKUP && hit_m) begin
      resp_valid = 1'b1; resp_hit_main = 1'b1; resp_data = m_data[idx];
    end else if (state_q == S_LOOKUP && hit_r) begin
      resp_valid = 1'b1; resp_hit_ret = 1'b1; resp_data = r_data[hit_slot];
    end else if (state_q == S_REFILL) begin
      resp_valid = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      addr_q     <= '0;
      fill_q     <= '0;
      m_vld      <= '0;
      r_vld      <= '0;
      n_retained <= '0;
    end else begin
      unique case (state_q)
        S_IDLE:    if (req_valid) begin addr_q <= req_addr; state_q <= S_LOOKUP; end
        S_LOOKUP:  state_q <= (hit_m || hit_r) ? S_IDLE : S_MEMREQ;
        S_MEMREQ:  if (mem_req_ready) state_q <= S_MEMWAIT;
        S_MEMWAIT: if (mem_resp_valid) begin fill_q <= mem_resp_data; state_q <= S_REFILL; end
        S_REFILL: begin
          m_vld[idx] <= 1'b1;
          if (retain) begin
            r_vld[min_slot] <= 1'b1;
            n_retained      <= n_retained + 1'b1;
          end
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state_q == S_REFILL) begin
      m_tag[idx]  <= tag;
      m_data[idx] <= fill_q;
      if (retain) begin
        r_tag[min_slot]  <= victim_addr;
        r_data[min_slot] <= m_data[idx];
      end
    end
  end

  // Handshake rules: a refill request is held until accepted, and an answer
  // comes from exactly one source.
  a_mem_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req_addr));
  a_one_hit: assert property (@(posedge clk) disable iff (!rst_n)
    !(resp_hit_main && resp_hit_ret));

endmodule
