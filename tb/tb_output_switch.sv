// tb_output_switch: feeds random triples with random upstream gaps and random
// downstream backpressure and checks that the serial stream is S, P1, P2 of
// each triple in order, that the last marker sits on the final P2 bit, and that
// with no gaps and no backpressure the switch moves one bit per clock.
module tb_output_switch;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sys = 0, in_p1 = 0, in_p2 = 0, in_last = 0, in_ready;
  logic out_valid, out_bit, out_last, out_ready = 0;
  int checks = 0, failures = 0;
  bit tx[$];
  int ntri, nout;

  always #5 clk = ~clk;

  output_switch dut (.*);

  task automatic run(int n, bit random_flow);
    int sent, got, cyc;
    bit cur[3];
    bit fire_in;
    sent = 0; got = 0; cyc = 0;
    tx.delete();
    while (got < 3 * n && cyc < 20 * n) begin
      if (!in_valid && sent < n && (!random_flow || $urandom_range(0, 3) != 0)) begin
        cur[0] = 1'($urandom_range(0, 1)); cur[1] = 1'($urandom_range(0, 1)); cur[2] = 1'($urandom_range(0, 1));
        in_valid = 1; in_sys = cur[0]; in_p1 = cur[1]; in_p2 = cur[2]; in_last = (sent == n - 1);
        tx.push_back(cur[0]); tx.push_back(cur[1]); tx.push_back(cur[2]);
        sent++;
      end
      out_ready = random_flow ? ($urandom_range(0, 2) != 0) : 1'b1;
      #1;
      fire_in = in_valid && in_ready;
      if (out_valid && out_ready) begin
        checks++;
        if (out_bit != tx[got] || out_last != (got == 3 * n - 1)) begin
          failures++; $display("bit %0d: %b last %b, expected %b", got, out_bit, out_last, tx[got]);
        end
        got++;
      end
      @(negedge clk); cyc++;
      if (fire_in) in_valid = 0;
    end
    checks++;
    if (got != 3 * n || (!random_flow && cyc != 3 * n)) begin
      failures++; $display("%0d bits in %0d cycles", got, cyc);
    end
    $display("%0d triples, %0d bits, %0d cycles", n, got, cyc);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(50, 1);
    run(200, 1);
    run(30, 0);
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
