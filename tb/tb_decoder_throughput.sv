// tb_decoder_throughput: runs the decoder at its default sizes on the largest
// and the smallest block with 5 iterations and measures the cycles of each
// phase (load, iterations, output). It reports the throughput these cycle
// counts give at a 214.37 MHz clock and checks that the iterations run at one
// trellis step per clock on average: 2 * iterations * (ceil(K/32)+1) * 32
// cycles plus one start cycle per half-iteration, plus up to ROWS + 2 cycles
// while the interleaver table is finished. Decoded bits are checked
// against the sent bits on a noise-free channel.
module tb_decoder_throughput;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  localparam int W = 32, ROWS = 20, ITERS = 5;
  localparam real F_MHZ = 214.37;

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

  turbo_decoder dut (.*);

  task automatic run_block(int k);
    int_q u, ui, p1, p2, pi;
    int c_load, c_iter, c_out, berr, nwin, exp_iter;
    real mbps_core, mbps_all;
    for (int i = 0; i < k; i++) u.push_back(int'($urandom_range(0, 1)));
    pi = ref_interleave(k, ROWS);
    for (int i = 0; i < k; i++) ui.push_back(u[pi[i]]);
    p1 = ref_rsc(u); p2 = ref_rsc(ui);
    @(negedge clk); k_len = kidx_t'(k); n_iter = 4'(ITERS); start = 1;
    @(negedge clk); start = 0;
    c_load = 0;
    for (int i = 0; i < k; i++) begin
      in_valid = 1;
      in_sys = llr_t'(u[i] != 0 ? 12 : -12);
      in_p1  = llr_t'(p1[i] != 0 ? 12 : -12);
      in_p2  = llr_t'(p2[i] != 0 ? 12 : -12);
      @(negedge clk); c_load++;
    end
    in_valid = 0;
    c_iter = 0;
    while (!out_valid && c_iter < 200000) begin @(negedge clk); c_iter++; end
    c_out = 0; berr = 0;
    while (out_valid) begin
      if (out_bit != (u[c_out] != 0)) berr++;
      c_out++;
      @(negedge clk);
    end
    nwin = (k + W - 1) / W;
    exp_iter = 2 * ITERS * ((nwin + 1) * W + 1);
    checks += 3;
    if (berr != 0) begin failures++; $display("K=%0d: %0d bit errors", k, berr); end
    if (c_out != k) begin failures++; $display("K=%0d: %0d outputs", k, c_out); end
    if (c_iter < exp_iter || c_iter > exp_iter + ROWS + 2) begin
      failures++; $display("K=%0d: iterations took %0d cycles, expected about %0d", k, c_iter, exp_iter);
    end
    mbps_core = real'(k) * F_MHZ / real'(c_iter);
    mbps_all  = real'(k) * F_MHZ / real'(c_load + c_iter + c_out);
    $display("K=%0d, %0d iterations: load %0d, iterate %0d, output %0d cycles; at %.2f MHz: %.2f Mb/s iterating, %.2f Mb/s with load and output",
             k, ITERS, c_load, c_iter, c_out, F_MHZ, mbps_core, mbps_all);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(5114);
    run_block(40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
