// tb_turbo_encoder: encodes random blocks and compares the S, P1 and P2
// streams with the reference RSC encoder and interleaver. Checks the number of
// output triples, the final-triple marker and that a block leaves within
// K + ROWS - 1 cycles (pruning stalls included) when out_ready stays high;
// some blocks are read with random backpressure on out_ready.
module tb_turbo_encoder;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  localparam int ROWS = 20;

  logic clk = 0, rst_n = 0, start = 0;
  kidx_t k_len;
  logic in_valid = 0, in_bit = 0, in_ready;
  logic out_ready = 1;
  logic out_valid, out_sys, out_p1, out_p2, out_last, busy;

  int checks = 0, failures = 0, stalls = 0;

  always #5 clk = ~clk;

  turbo_encoder #(.K_MAX(5114), .ROWS(ROWS)) dut (.*);

  task automatic run_block(int k, bit bp);
    int_q u, ui, p1, p2, pi;
    int n, cyc, nerr;
    for (int i = 0; i < k; i++) u.push_back(int'($urandom_range(0, 1)));
    pi = ref_interleave(k, ROWS);
    for (int i = 0; i < k; i++) ui.push_back(u[pi[i]]);
    p1 = ref_rsc(u);
    p2 = ref_rsc(ui);
    @(negedge clk); k_len = kidx_t'(k); start = 1;
    @(negedge clk); start = 0;
    for (int i = 0; i < k; i++) begin
      while (!in_ready) @(negedge clk);
      in_valid = 1; in_bit = u[i][0];
      @(negedge clk);
    end
    in_valid = 0;
    n = 0; cyc = 0; nerr = 0;
    while (n < k && cyc < 8 * k + 100) begin
      out_ready = bp ? ($urandom_range(0, 2) != 0) : 1'b1;
      #1;
      if (out_valid && out_ready) begin
        checks++;
        if (out_sys != u[n][0] || out_p1 != p1[n][0] || out_p2 != p2[n][0] ||
            out_last != (n == k - 1)) begin
          failures++; nerr++;
          if (nerr < 5) $display("K=%0d k=%0d: got %b%b%b exp %0d%0d%0d", k, n,
                                 out_sys, out_p1, out_p2, u[n], p1[n], p2[n]);
        end
        n++;
      end else if (!out_valid) stalls++;
      @(negedge clk); cyc++;
    end
    checks++;
    out_ready = 1;
    if (n != k || (!bp && cyc > k + ROWS)) begin
      failures++;
      $display("K=%0d: %0d triples in %0d cycles", k, n, cyc);
    end
    $display("K=%0d: %0d triples in %0d cycles, %0d mismatches", k, n, cyc, nerr);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(40, 0);
    run_block(41, 1);
    run_block(333, 0);
    run_block(777, 1);
    run_block(5114, 0);
    checks++;
    if (stalls == 0) begin failures++; $display("no pruning stall seen"); end
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
