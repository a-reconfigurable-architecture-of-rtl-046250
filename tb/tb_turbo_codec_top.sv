// tb_turbo_codec_top: end-to-end test of the coding core at its default sizes.
//
// Random information blocks (including the largest, K = 5114) go through the
// turbo encoder and its output switch, read with random backpressure; the
// serial stream S, P1, P2, ... is split again and passes a noisy channel modelled here and the
// resulting LLRs go into the turbo decoder. The decoded bits must equal the
// information bits, the soft outputs must equal the reference decoder's, and
// the encoder streams must equal the reference encoder's. At the same time
// the hybrid cache serves conflict-heavy read traffic from a memory model and
// every answer is checked for the right data. Counted mechanisms (each must
// occur): output backpressure, interleaver pruning stalls, dummy-backward windows, a partial last
// window, several decoder iterations, corrected channel errors, and main hits,
// retention hits, misses and retained victims in the cache.
module tb_turbo_codec_top;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  localparam int W = 32, ROWS = 20;

  logic clk = 0, rst_n = 0;
  logic enc_start = 0, enc_in_valid = 0, enc_in_bit = 0;
  kidx_t enc_k_len = 0;
  logic enc_in_ready, enc_data_valid, enc_data_out, enc_data_last, enc_busy;
  logic enc_data_ready = 1;
  logic dec_start = 0, dec_in_valid = 0;
  kidx_t dec_k_len = 0;
  logic [3:0] dec_n_iter = 0;
  llr_t dec_in_sys = 0, dec_in_p1 = 0, dec_in_p2 = 0;
  logic dec_in_ready, dec_out_valid, dec_out_bit, dec_out_last, dec_busy;
  kidx_t dec_out_idx;
  logic signed [BR_W:0] dec_out_llr;
  logic [3:0] dec_iter_count;
  logic llc_req_valid = 0, llc_req_ready, llc_resp_valid, llc_resp_hit_main, llc_resp_hit_ret;
  logic [15:0] llc_req_addr = 0, llc_mem_req_addr, llc_n_retained;
  logic [31:0] llc_resp_data, llc_mem_resp_data;
  logic llc_mem_req_valid, llc_mem_req_ready, llc_mem_resp_valid;

  int checks = 0, failures = 0;
  int ev_backpressure = 0, ev_stall = 0, ev_dummy = 0, ev_partial = 0, ev_iter = 0, ev_corrected = 0;
  int ev_main = 0, ev_ret = 0, ev_miss = 0;
  bit codec_done = 0;

  always #5 clk = ~clk;

  turbo_codec_top dut (.*);

  // ---------------------------------------------------------------- codec
  function automatic int chan(int b, int amp, int noise);
    int v;
    v = (b != 0 ? amp : -amp) + int'($urandom_range(0, 2 * noise)) - noise;
    if (v > 31) v = 31;
    if (v < -31) v = -31;
    return v;
  endfunction

  task automatic run_block(int k, int iters);
    int_q u, ui, p1, p2, pi, es, e1, e2, ls, l1, l2, post;
    int n, nerr, berr, cerr, cyc;
    for (int i = 0; i < k; i++) u.push_back(int'($urandom_range(0, 1)));
    pi = ref_interleave(k, ROWS);
    for (int i = 0; i < k; i++) ui.push_back(u[pi[i]]);
    p1 = ref_rsc(u);
    p2 = ref_rsc(ui);
    // Encode.
    @(negedge clk); enc_k_len = kidx_t'(k); enc_start = 1;
    @(negedge clk); enc_start = 0;
    for (int i = 0; i < k; i++) begin
      while (!enc_in_ready) @(negedge clk);
      enc_in_valid = 1; enc_in_bit = u[i][0];
      @(negedge clk);
    end
    enc_in_valid = 0;
    // Collect the serial stream S, P1, P2, ... with random backpressure.
    cyc = 0; n = 0; nerr = 0;
    while (n < 3 * k && cyc < 8 * k + 100) begin
      enc_data_ready = ($urandom_range(0, 3) != 0);
      #1;
      if (enc_data_valid && enc_data_ready) begin
        if (n % 3 == 0) es.push_back(int'(enc_data_out));
        else if (n % 3 == 1) e1.push_back(int'(enc_data_out));
        else e2.push_back(int'(enc_data_out));
        checks++;
        if (enc_data_last != (n == 3 * k - 1)) begin failures++; $display("last marker wrong at %0d", n); end
        n++;
      end else if (enc_data_valid) ev_backpressure++;
      else ev_stall++;
      @(negedge clk); cyc++;
    end
    enc_data_ready = 1;
    for (int i = 0; i < k; i++) begin
      checks++;
      if (i >= es.size() || es[i] != u[i] || e1[i] != p1[i] || e2[i] != p2[i]) nerr++;
    end
    failures += nerr;
    // Channel.
    cerr = 0;
    for (int i = 0; i < k; i++) begin
      ls.push_back(chan(i < es.size() ? es[i] : 0, 10, 14));
      l1.push_back(chan(i < e1.size() ? e1[i] : 0, 10, 14));
      l2.push_back(chan(i < e2.size() ? e2[i] : 0, 10, 14));
      if ((ls[i] > 0) != (u[i] != 0)) cerr++;
    end
    post = ref_turbo(ls, l1, l2, pi, iters, W);
    // Decode.
    @(negedge clk); dec_k_len = kidx_t'(k); dec_n_iter = 4'(iters); dec_start = 1;
    @(negedge clk); dec_start = 0;
    for (int i = 0; i < k; i++) begin
      while (!dec_in_ready) @(negedge clk);
      dec_in_valid = 1;
      dec_in_sys = llr_t'(ls[i]); dec_in_p1 = llr_t'(l1[i]); dec_in_p2 = llr_t'(l2[i]);
      @(negedge clk);
    end
    dec_in_valid = 0;
    cyc = 0;
    while (!dec_out_valid && cyc < 400000) begin @(negedge clk); cyc++; end
    n = 0; berr = 0;
    while (dec_out_valid) begin
      checks++;
      if (int'(dec_out_llr) != post[n] || int'(dec_out_idx) != n) failures++;
      if (dec_out_bit != (u[n] != 0)) berr++;
      n++;
      @(negedge clk);
    end
    checks += 3;
    if (n != k) begin failures++; $display("K=%0d: %0d outputs", k, n); end
    if (berr != 0) begin failures++; $display("K=%0d: %0d residual bit errors", k, berr); end
    if (int'(dec_iter_count) != iters) begin failures++; $display("K=%0d: %0d iterations", k, dec_iter_count); end
    if (iters > 1) ev_iter++;
    if (k > 2 * W) ev_dummy++;
    if (k % W != 0) ev_partial++;
    if (cerr > 0 && berr == 0) ev_corrected++;
    $display("K=%0d iters=%0d: encoder mismatches %0d, channel errors %0d, decoded errors %0d, decode %0d cycles",
             k, iters, nerr, cerr, berr, cyc);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(40, 3);
    run_block(333, 5);
    run_block(5114, 6);
    codec_done = 1;
  end

  // ---------------------------------------------------------------- cache
  function automatic logic [31:0] mem_word(logic [15:0] a);
    return {~a, a} ^ 32'h0f1e_2d3c;
  endfunction

  initial begin
    llc_mem_req_ready = 0; llc_mem_resp_valid = 0; llc_mem_resp_data = 0;
    forever begin
      @(negedge clk);
      llc_mem_req_ready = 0; llc_mem_resp_valid = 0;
      if (llc_mem_req_valid) begin
        logic [15:0] a;
        llc_mem_req_ready = 1; a = llc_mem_req_addr;
        @(negedge clk); llc_mem_req_ready = 0;
        repeat ($urandom_range(1, 3)) @(negedge clk);
        llc_mem_resp_valid = 1; llc_mem_resp_data = mem_word(a);
      end
    end
  end

  task automatic llc_access(int a);
    int cyc;
    while (!llc_req_ready) @(negedge clk);
    llc_req_valid = 1; llc_req_addr = 16'(a);
    @(negedge clk); llc_req_valid = 0;
    cyc = 0;
    while (!llc_resp_valid && cyc < 100) begin @(negedge clk); cyc++; end
    checks++;
    if (!llc_resp_valid || llc_resp_data != mem_word(16'(a))) begin
      failures++; $display("cache addr %h: wrong answer", a);
    end
    if (llc_resp_hit_main) ev_main++; else if (llc_resp_hit_ret) ev_ret++; else ev_miss++;
    @(negedge clk);
  endtask

  initial begin
    repeat (5) @(negedge clk);
    for (int p = 0; p < 4; p++)
      for (int r = 0; r < 8; r++) begin
        llc_access(p * 7 + 3);
        llc_access(p * 7 + 3 + 64 * (p + 2));
      end
    for (int t = 0; t < 600; t++) llc_access(int'($urandom_range(0, 299)));
    wait (codec_done);
    checks++;
    begin
      string missing;
      missing = "";
      if (ev_stall == 0)        missing = {missing, " interleaver-stall"};
      if (ev_backpressure == 0) missing = {missing, " output-backpressure"};
      if (ev_dummy == 0)        missing = {missing, " dummy-backward"};
      if (ev_partial == 0)      missing = {missing, " partial-window"};
      if (ev_iter == 0)         missing = {missing, " iterations"};
      if (ev_corrected == 0)    missing = {missing, " error-correction"};
      if (ev_main == 0)         missing = {missing, " cache-main-hit"};
      if (ev_ret == 0)          missing = {missing, " cache-retention-hit"};
      if (ev_miss == 0)         missing = {missing, " cache-miss"};
      if (llc_n_retained == 0)  missing = {missing, " cache-retain"};
      if (missing != "") begin failures++; $display("never happened:%s", missing); end
    end
    $display("events: backpressure %0d, stalls %0d, dummy windows %0d, partial windows %0d, multi-iteration blocks %0d, corrected blocks %0d",
             ev_backpressure, ev_stall, ev_dummy, ev_partial, ev_iter, ev_corrected);
    $display("cache: main hits %0d, retention hits %0d, misses %0d, retained %0d",
             ev_main, ev_ret, ev_miss, llc_n_retained);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
