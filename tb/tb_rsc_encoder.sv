// tb_rsc_encoder: drives random bit sequences into the RSC encoder and
// compares each parity bit and the state with the reference shift-register
// model; also checks that clear returns it to state 0 and that en low holds it.
module tb_rsc_encoder;
  import turbo_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, en = 0, u = 0;
  logic parity;
  logic [2:0] state;
  int checks = 0, failures = 0, st = 0;

  always #5 clk = ~clk;

  rsc_encoder dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 4; blk++) begin
      clear = 1; @(negedge clk); clear = 0; st = 0;
      for (int i = 0; i < 300; i++) begin
        en = ($urandom_range(0, 7) != 0);
        u  = 1'($urandom_range(0, 1));
        #1;
        checks++;
        if (parity != 1'(ref_par(st, int'(u))) || int'(state) != st) begin
          failures++;
          $display("step %0d: parity %b state %0d, expected %0d state %0d", i, parity, state, ref_par(st, int'(u)), st);
        end
        if (en) st = ref_next(st, int'(u));
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
