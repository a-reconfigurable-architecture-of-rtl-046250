// tb_siso_decoder: checks the sliding-window max-log-MAP SISO decoder bit for
// bit against the reference model, for several block sizes (full and partial
// last windows, a single window, the largest block). Also checks that every
// step gets exactly one extrinsic value and that a block takes (ceil(K/W)+1)*W
// cycles.
module tb_siso_decoder;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  localparam int W = 32;

  logic clk = 0, rst_n = 0, start = 0;
  kidx_t k_len;
  kidx_t addr_f, addr_d, addr_b, ext_addr;
  branch_t br_f, br_d, br_b;
  logic ext_valid, busy, done;
  ext_t ext_val;

  int checks = 0, failures = 0;
  int gs_a[5114], lp_a[5114], got[5114], seen[5114];

  always #5 clk = ~clk;

  siso_decoder #(.K_MAX(5114), .W(W)) dut (.*);

  always_comb begin
    br_f.gsys = BR_W'(gs_a[addr_f]); br_f.lp = llr_t'(lp_a[addr_f]);
    br_d.gsys = BR_W'(gs_a[addr_d]); br_d.lp = llr_t'(lp_a[addr_d]);
    br_b.gsys = BR_W'(gs_a[addr_b]); br_b.lp = llr_t'(lp_a[addr_b]);
  end

  always @(posedge clk) if (ext_valid) begin
    got[ext_addr]  <= int'(ext_val);
    seen[ext_addr] <= seen[ext_addr] + 1;
  end

  task automatic run_block(int k);
    int_q gs, lp, exp;
    int cyc, nerr;
    for (int i = 0; i < k; i++) begin
      gs_a[i] = int'($urandom_range(0, 316)) - 158;
      lp_a[i] = int'($urandom_range(0, 62)) - 31;
      gs.push_back(gs_a[i]); lp.push_back(lp_a[i]);
      seen[i] = 0;
    end
    exp = ref_siso(gs, lp, W);
    @(negedge clk); k_len = kidx_t'(k); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);
    nerr = 0;
    for (int i = 0; i < k; i++) begin
      checks++;
      if (got[i] != exp[i] || seen[i] != 1) begin
        failures++; nerr++;
        if (nerr < 5) $display("K=%0d step %0d: got %0d exp %0d seen %0d", k, i, got[i], exp[i], seen[i]);
      end
    end
    checks++;
    if (cyc != ((k + W - 1) / W + 1) * W) begin
      failures++;
      $display("K=%0d: %0d cycles, expected %0d", k, cyc, ((k + W - 1) / W + 1) * W);
    end
    $display("K=%0d done in %0d cycles, %0d mismatches", k, cyc, nerr);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(40);
    run_block(32);
    run_block(20);
    run_block(64);
    run_block(100);
    run_block(1000);
    run_block(5114);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
