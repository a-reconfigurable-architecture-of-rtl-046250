// tb_turbo_decoder: encodes random blocks with the reference encoder, maps
// them to noisy channel LLRs, decodes them and checks (1) every a-posteriori
// output value bit for bit against the reference turbo decoder, (2) that the
// decoded bits equal the sent bits, (3) the cycle count of the iterations.
module tb_turbo_decoder;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  localparam int W = 32, ROWS = 20;

  logic clk = 0, rst_n = 0, start = 0;
  kidx_t k_len;
  logic [3:0] n_iter;
  logic in_valid = 0, in_ready;
  llr_t in_sys, in_p1, in_p2;
  logic out_valid, out_bit, out_last, busy;
  kidx_t out_idx;
  logic signed [BR_W:0] out_llr;
  logic [3:0] iter_count;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  turbo_decoder #(.K_MAX(5114), .W(W), .ROWS(ROWS)) dut (.*);

  // Channel LLR of a bit: +-amp plus a noise of up to +-noise, saturated.
  function automatic int chan(int b, int amp, int noise);
    int v;
    v = (b != 0 ? amp : -amp) + int'($urandom_range(0, 2 * noise)) - noise;
    if (v > 31) v = 31;
    if (v < -31) v = -31;
    return v;
  endfunction

  task automatic run_block(int k, int iters, int amp, int noise);
    int_q u, ui, p1, p2, pi, ls, l1, l2, post;
    int n, cyc, nerr, berr, chan_err, run_cyc;
    for (int i = 0; i < k; i++) u.push_back(int'($urandom_range(0, 1)));
    pi = ref_interleave(k, ROWS);
    for (int i = 0; i < k; i++) ui.push_back(u[pi[i]]);
    p1 = ref_rsc(u);
    p2 = ref_rsc(ui);
    chan_err = 0;
    for (int i = 0; i < k; i++) begin
      ls.push_back(chan(u[i], amp, noise));
      l1.push_back(chan(p1[i], amp, noise));
      l2.push_back(chan(p2[i], amp, noise));
      if ((ls[i] > 0) != (u[i] != 0)) chan_err++;
    end
    post = ref_turbo(ls, l1, l2, pi, iters, W);
    @(negedge clk); k_len = kidx_t'(k); n_iter = 4'(iters); start = 1;
    @(negedge clk); start = 0;
    for (int i = 0; i < k; i++) begin
      while (!in_ready) @(negedge clk);
      in_valid = 1; in_sys = llr_t'(ls[i]); in_p1 = llr_t'(l1[i]); in_p2 = llr_t'(l2[i]);
      @(negedge clk);
    end
    in_valid = 0;
    cyc = 0;
    while (!out_valid && cyc < 400000) begin @(negedge clk); cyc++; end
    run_cyc = cyc;
    n = 0; nerr = 0; berr = 0;
    while (out_valid) begin
      checks++;
      if (int'(out_idx) != n || int'(out_llr) != post[n] || out_last != (n == k - 1)) begin
        failures++; nerr++;
        if (nerr < 5) $display("K=%0d bit %0d: idx %0d llr %0d exp %0d", k, n, out_idx, out_llr, post[n]);
      end
      if (out_bit != (u[n] != 0)) berr++;
      n++;
      @(negedge clk);
    end
    checks += 2;
    if (n != k) begin failures++; $display("K=%0d: %0d outputs", k, n); end
    if (berr != 0) begin failures++; $display("K=%0d: %0d bit errors after decoding", k, berr); end
    // 2*iters half-iterations of (ceil(K/W)+1)*W cycles, plus one cycle of
    // SISO start per half-iteration and a few cycles of state transitions.
    checks++;
    if (run_cyc > 2 * iters * (((k + W - 1) / W + 1) * W + 1) + 6 ||
        run_cyc < 2 * iters * (((k + W - 1) / W + 1) * W)) begin
      failures++; $display("K=%0d: decoding took %0d cycles", k, run_cyc);
    end
    $display("K=%0d iters=%0d: %0d channel errors, %0d decoded errors, %0d value mismatches, %0d cycles",
             k, iters, chan_err, berr, nerr, run_cyc);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(40, 4, 8, 14);
    run_block(200, 6, 10, 14);
    run_block(1000, 8, 10, 15);
    run_block(5114, 6, 10, 14);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
