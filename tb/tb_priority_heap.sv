// tb_priority_heap: random writes and priority bumps against a reference array;
// after every cycle the root must name the lowest priority (empty slots count
// as 0, ties to the lowest slot).
module tb_priority_heap;
  logic clk = 0, rst_n = 0, wr_valid = 0, bump = 0;
  logic [2:0] wr_slot = 0, bump_slot = 0, min_slot, wr_prio = 0, min_prio;
  int checks = 0, failures = 0;
  int pr[8];
  bit used[8];

  always #5 clk = ~clk;

  priority_heap #(.NSLOT(8), .PRIO_W(3)) dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int ms, mp;
      ms = 0; mp = used[0] ? pr[0] : 0;
      for (int i = 1; i < 8; i++) if ((used[i] ? pr[i] : 0) < mp) begin mp = pr[i]; ms = i; end
      checks++;
      if (int'(min_slot) != ms || int'(min_prio) != mp) begin
        failures++; $display("t=%0d root %0d/%0d expected %0d/%0d", t, min_slot, min_prio, ms, mp);
      end
      wr_valid = ($urandom_range(0, 3) == 0);
      wr_slot = 3'($urandom_range(0, 7));
      wr_prio = 3'($urandom_range(1, 7));
      bump = ($urandom_range(0, 1) == 1);
      bump_slot = 3'($urandom_range(0, 7));
      @(negedge clk);
      if (bump && used[bump_slot] && pr[bump_slot] < 7) pr[bump_slot]++;
      if (wr_valid) begin pr[wr_slot] = int'(wr_prio); used[wr_slot] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
