// tb_block_interleaver: compares the generated address sequence with the
// reference matrix interleaver for block sizes 40..5114, checks that it is a
// permutation, that done marks the last address, that an address is held
// while ready is low, and that a block takes at most K + ROWS - 1 cycles when
// ready stays high.
module tb_block_interleaver;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  localparam int ROWS = 20;

  logic clk = 0, rst_n = 0, start = 0;
  kidx_t k_len, idx, addr;
  logic valid, done, busy;
  logic ready = 1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  block_interleaver #(.ROWS(ROWS)) dut (.*);

  task automatic run_block(int k, bit bp);
    int_q pi;
    int n, cyc, nerr;
    bit used[5114];
    pi = ref_interleave(k, ROWS);
    @(negedge clk); k_len = kidx_t'(k); start = 1;
    @(negedge clk); start = 0;
    n = 0; cyc = 0; nerr = 0;
    while (busy && cyc < 6 * k) begin
      ready = bp ? ($urandom_range(0, 1) != 0) : 1'b1;
      #1;
      if (valid && ready) begin
        checks++;
        if (int'(idx) != n || int'(addr) != pi[n] || used[addr] || done != (n == k - 1)) begin
          failures++; nerr++;
          if (nerr < 5) $display("K=%0d k=%0d: idx %0d addr %0d exp %0d", k, n, idx, addr, pi[n]);
        end
        used[addr] = 1;
        n++;
      end
      @(negedge clk); cyc++;
    end
    checks++;
    ready = 1;
    if (n != k || (!bp && cyc > k + ROWS - 1)) begin
      failures++; $display("K=%0d: %0d addresses in %0d cycles", k, n, cyc);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_block(40, 0);
    run_block(59, 1);
    run_block(481, 0);
    run_block(1234, 1);
    run_block(5114, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
