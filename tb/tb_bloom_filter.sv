// tb_bloom_filter: inserts random addresses and checks every query against a
// reference model of the counting filter (same two hash functions, saturating
// counters, minimum of the two), and that an address never inserted into an
// empty filter reads 0 and one inserted n times reads at least min(n, 7).
module tb_bloom_filter;
  logic clk = 0, rst_n = 0, clear = 0, ins_valid = 0;
  logic [15:0] ins_addr = 0, q_addr = 0;
  logic [2:0] q_count;
  int checks = 0, failures = 0;
  int cnt[256];
  int exact[int];

  always #5 clk = ~clk;

  bloom_filter #(.ADDR_W(16), .IDX_W(8), .CNT_W(3)) dut (.*);

  function automatic int h0(int a);
    return (a & 255) ^ ((a >> 8) & 255);
  endfunction
  function automatic int h1(int a);
    int r;
    r = ((a << 4) | (a >> 12)) & 16'hffff;
    return (r & 255) ^ ((r >> 8) & 255) ^ 'h5a;
  endfunction
  function automatic int est(int a);
    return cnt[h0(a)] < cnt[h1(a)] ? cnt[h0(a)] : cnt[h1(a)];
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) cnt[i] = 0;
    for (int t = 0; t < 3000; t++) begin
      int a, qa;
      a  = int'($urandom_range(0, 40)) * 977 & 16'hffff;
      qa = (t % 3 == 0) ? int'($urandom_range(0, 65535)) : a;
      ins_valid = ($urandom_range(0, 1) == 1);
      ins_addr = 16'(a);
      q_addr = 16'(qa);
      #1;
      checks++;
      if (int'(q_count) != est(qa)) begin
        failures++; $display("query %h: %0d expected %0d", qa, q_count, est(qa));
      end
      if (exact.exists(qa)) begin
        checks++;
        if (int'(q_count) < (exact[qa] > 7 ? 7 : exact[qa])) begin
          failures++; $display("query %h under-estimates", qa);
        end
      end
      @(negedge clk);
      if (ins_valid) begin
        if (cnt[h0(a)] < 7) cnt[h0(a)]++;
        if (h1(a) != h0(a) && cnt[h1(a)] < 7) cnt[h1(a)]++;
        if (exact.exists(a)) exact[a]++; else exact[a] = 1;
      end
    end
    ins_valid = 0;
    clear = 1; @(negedge clk); clear = 0;
    q_addr = 16'h1234; #1;
    checks++;
    if (q_count != 0) begin failures++; $display("clear failed"); end
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
