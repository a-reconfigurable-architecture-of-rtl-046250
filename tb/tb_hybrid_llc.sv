// tb_hybrid_llc: drives the hybrid cache with conflict-heavy read traffic
// against a memory model with random latency. Each answer is checked for the
// right data and against a reference model of the replacement policy (main
// hit, retention hit or miss, with the Bloom filter and heap modelled on
// integers). Counts main hits, retention hits, misses and retained victims,
// and fails if one of them never happened.
module tb_hybrid_llc;
  localparam int SETS = 64, NRET = 8;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready;
  logic [15:0] req_addr = 0;
  logic resp_valid, resp_hit_main, resp_hit_ret;
  logic [31:0] resp_data;
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  logic [15:0] mem_req_addr;
  logic [31:0] mem_resp_data;
  logic [15:0] n_retained;

  int checks = 0, failures = 0;
  int n_main = 0, n_ret = 0, n_miss = 0, n_keep = 0;

  always #5 clk = ~clk;

  hybrid_llc #(.ADDR_W(16), .DATA_W(32), .SETS(SETS), .NRET(NRET), .PRIO_W(3)) dut (.*);

  function automatic logic [31:0] mem_word(logic [15:0] a);
    return {a, ~a} ^ 32'h5a5a_c3c3;
  endfunction

  // Memory model: accepts a request after 0..2 cycles, answers 1..4 cycles later.
  initial begin
    mem_req_ready = 0; mem_resp_valid = 0; mem_resp_data = 0;
    forever begin
      @(negedge clk);
      mem_req_ready = 0; mem_resp_valid = 0;
      if (mem_req_valid) begin
        logic [15:0] a;
        repeat ($urandom_range(0, 2)) @(negedge clk);
        mem_req_ready = 1; a = mem_req_addr;
        @(negedge clk); mem_req_ready = 0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        mem_resp_valid = 1; mem_resp_data = mem_word(a);
      end
    end
  end

  // Reference model.
  int mt[SETS]; bit mv[SETS];
  int rt[NRET]; bit rv[NRET]; int pr[NRET];
  int bc[256];

  function automatic int h0(int a); return (a & 255) ^ ((a >> 8) & 255); endfunction
  function automatic int h1(int a);
    int r; r = ((a << 4) | (a >> 12)) & 16'hffff;
    return (r & 255) ^ ((r >> 8) & 255) ^ 'h5a;
  endfunction

  // Returns 0 for a main hit, 1 for a retention hit, 2 for a miss.
  function automatic int model(int a);
    int idx, tag, slot, ms, mp, v, vc;
    idx = a % SETS; tag = a / SETS;
    if (mv[idx] && mt[idx] == tag) return 0;
    for (int i = 0; i < NRET; i++) if (rv[i] && rt[i] == a) begin
      if (pr[i] < 7) pr[i]++;
      return 1;
    end
    if (bc[h0(a)] < 7) bc[h0(a)]++;
    if (h1(a) != h0(a) && bc[h1(a)] < 7) bc[h1(a)]++;
    if (mv[idx]) begin
      v = mt[idx] * SETS + idx;
      vc = bc[h0(v)] < bc[h1(v)] ? bc[h0(v)] : bc[h1(v)];
      ms = 0; mp = rv[0] ? pr[0] : 0;
      for (int i = 1; i < NRET; i++) if ((rv[i] ? pr[i] : 0) < mp) begin mp = pr[i]; ms = i; end
      if (vc > mp) begin rt[ms] = v; rv[ms] = 1; pr[ms] = vc; n_keep++; end
    end
    mv[idx] = 1; mt[idx] = tag;
    return 2;
  endfunction

  task automatic access(int a);
    int exp, cyc;
    exp = model(a);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_addr = 16'(a);
    @(negedge clk); req_valid = 0;
    cyc = 0;
    while (!resp_valid && cyc < 100) begin @(negedge clk); cyc++; end
    checks++;
    if (!resp_valid || resp_data != mem_word(16'(a)) ||
        resp_hit_main != (exp == 0) || resp_hit_ret != (exp == 1)) begin
      failures++;
      $display("addr %h: data %h hit %b%b, expected %h kind %0d", a, resp_data,
               resp_hit_main, resp_hit_ret, mem_word(16'(a)), exp);
    end
    if (exp == 0) n_main++; else if (exp == 1) n_ret++; else n_miss++;
    // A hit answers in the lookup cycle, right after the request.
    if (exp != 2) begin
      checks++;
      if (cyc != 0) begin failures++; $display("hit took %0d extra cycles", cyc); end
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Conflict misses: pairs of blocks on the same set, accessed in turn.
    for (int p = 0; p < 6; p++)
      for (int r = 0; r < 8; r++) begin
        access(p * 3 + 5);
        access(p * 3 + 5 + SETS * (p + 1));
      end
    // Mixed traffic on a small address pool.
    for (int t = 0; t < 1500; t++) access(int'($urandom_range(0, 399)));
    checks += 2;
    if (n_main == 0 || n_ret == 0 || n_miss == 0 || n_keep == 0) begin
      failures++; $display("a cache event never happened");
    end
    if (int'(n_retained) != n_keep) begin
      failures++; $display("retained %0d, model %0d", n_retained, n_keep);
    end
    $display("main hits %0d, retention hits %0d, misses %0d, retained %0d", n_main, n_ret, n_miss, n_keep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
