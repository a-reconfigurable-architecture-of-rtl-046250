// tb_state_metric_unit: applies random metrics and branch values to a forward
// and a backward instance and compares the results with the reference
// add-compare-select computed on integers and normalised to state 0.
module tb_state_metric_unit;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  metrics_t m_in, f_out, b_out;
  branch_t br;
  int checks = 0, failures = 0;

  state_metric_unit #(.FORWARD(1'b1)) u_f (.m_in(m_in), .br(br), .m_out(f_out));
  state_metric_unit #(.FORWARD(1'b0)) u_b (.m_in(m_in), .br(br), .m_out(b_out));

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int mi[8], fe[8], be[8], gs, lp;
      for (int s = 0; s < 8; s++) begin
        mi[s] = int'($urandom_range(0, 2000)) - 1000;
        m_in[s] = metric_t'(mi[s]);
        fe[s] = -1000000;
      end
      gs = int'($urandom_range(0, 316)) - 158;
      lp = int'($urandom_range(0, 62)) - 31;
      br.gsys = BR_W'(gs); br.lp = llr_t'(lp);
      for (int s = 0; s < 8; s++) begin
        int c0, c1;
        c0 = mi[s] + (ref_par(s, 0) != 0 ? lp : 0);
        c1 = mi[s] + gs + (ref_par(s, 1) != 0 ? lp : 0);
        if (c0 > fe[ref_next(s, 0)]) fe[ref_next(s, 0)] = c0;
        if (c1 > fe[ref_next(s, 1)]) fe[ref_next(s, 1)] = c1;
      end
      be = mi;
      bwd_step(be, gs, lp);
      #1;
      for (int s = 0; s < 8; s++) begin
        checks += 2;
        if (int'(f_out[s]) != fe[s] - fe[0]) begin
          failures++; $display("fwd state %0d: %0d exp %0d", s, f_out[s], fe[s] - fe[0]);
        end
        if (int'(b_out[s]) != be[s] - be[0]) begin
          failures++; $display("bwd state %0d: %0d exp %0d", s, b_out[s], be[s] - be[0]);
        end
      end
    end
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
