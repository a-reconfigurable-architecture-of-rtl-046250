// tb_llr_unit: applies random forward/backward metrics and parity values and
// compares the extrinsic output with the reference max-log expression,
// including saturation at +-127.
module tb_llr_unit;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  metrics_t alpha, beta;
  llr_t lp;
  ext_t ext;
  int checks = 0, failures = 0, sat = 0;

  llr_unit dut (.*);

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int a[8], b[8], l, m0, m1, e, span;
      span = (t % 2) ? 100 : 800;
      for (int s = 0; s < 8; s++) begin
        a[s] = int'($urandom_range(0, 2 * span)) - span;
        b[s] = int'($urandom_range(0, 2 * span)) - span;
        alpha[s] = metric_t'(a[s]); beta[s] = metric_t'(b[s]);
      end
      l = int'($urandom_range(0, 62)) - 31;
      lp = llr_t'(l);
      m0 = -1000000; m1 = -1000000;
      for (int s = 0; s < 8; s++) begin
        int c0, c1;
        c0 = a[s] + b[ref_next(s, 0)] + (ref_par(s, 0) != 0 ? l : 0);
        c1 = a[s] + b[ref_next(s, 1)] + (ref_par(s, 1) != 0 ? l : 0);
        if (c0 > m0) m0 = c0;
        if (c1 > m1) m1 = c1;
      end
      e = sat_ext(m1 - m0);
      if (e != m1 - m0) sat++;
      #1;
      checks++;
      if (int'(ext) != e) begin failures++; $display("got %0d exp %0d", ext, e); end
    end
    checks++;
    if (sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
