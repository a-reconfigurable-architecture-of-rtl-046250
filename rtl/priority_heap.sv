// priority_heap: priorities of the blocks held in the retention part of the
// hybrid cache, with the lowest-priority entry always available.
//
// NSLOT slots each hold a priority; an empty slot counts as priority 0, so it
// is chosen before any occupied one. The root of the structure (min_slot,
// min_prio) names the entry to replace next. The published design names a priority
// heap; here the priorities sit in a register file and a comparator tree finds
// the minimum in the same cycle, which gives the same root as a binary
// min-heap without its multi-cycle sift operations (this design's choice).
// Ties go to the lowest slot number.
//
// Interface and timing: wr_valid writes wr_prio into wr_slot and marks it
// occupied; bump increments the priority of bump_slot (saturating), used on a
// hit. The root is combinational from the stored state. Reset empties all slots.
module priority_heap #(
  parameter int unsigned NSLOT  = 8,
  parameter int unsigned PRIO_W = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_valid,
  input  logic [$clog2(NSLOT)-1:0] wr_slot,
  input  logic [PRIO_W-1:0]        wr_prio,
  input  logic                     bump,
  input  logic [$clog2(NSLOT)-1:0] bump_slot,
  output logic [$clog2(NSLOT)-1:0] min_slot,
  output logic [PRIO_W-1:0]        min_prio
);

  localparam int unsigned SW = $clog2(NSLOT);

  logic [PRIO_W-1:0] prio_q [NSLOT];
  logic [NSLOT-1:0]  used_q;

  always_comb begin
    min_slot = '0;
    min_prio = used_q[0] ? prio_q[0] : '0;
    for (int i = 1; i < NSLOT; i++) begin
      logic [PRIO_W-1:0] p;
      p = used_q[i] ? prio_q[i] : '0;
      if (p < min_prio) begin
        min_prio = p;
        min_slot = SW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used_q <= '0;
      for (int i = 0; i < NSLOT; i++) prio_q[i] <= '0;
    end else begin
      if (bump && used_q[bump_slot] && prio_q[bump_slot] != '1)
        prio_q[bump_slot] <= prio_q[bump_slot] + 1'b1;
      if (wr_valid) begin
        prio_q[wr_slot] <= wr_prio;
        used_q[wr_slot] <= 1'b1;
      end
    end
  end

endmodule
