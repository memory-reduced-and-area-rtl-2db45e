// Checks one alpha recursion step against the reference max-log-MAP step
// (normalised to state 0, saturated to 12 bits) for random metric sets and
// random LLRs, including saturating metrics.
module tb_alpha_unit;
  import turbo_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  sm_vec_t mi, mo;
  bm_vec_t g;
  llr_t    ls, lp;
  ext_t    la;

  branch_metric_unit u_bmu (.ls_i(ls), .la_i(la), .lp_i(lp), .gamma_o(g));
  alpha_unit dut (.alpha_i(mi), .gamma_i(g), .alpha_o(mo));

  initial begin
    for (int k = 0; k < 3000; k++) begin
      mvec_t r, e;
      int spread;
      spread = (k % 5 == 0) ? 4000 : 300;
      for (int s = 0; s < 8; s++) begin
        r[s]  = (s == 0) ? 0 : int'($urandom_range(0, spread)) - spread / 2;
        mi[s] = sm_t'(r[s]);
      end
      ls = llr_t'($urandom); la = ext_t'($urandom); lp = llr_t'($urandom);
      @(posedge clk);
      e = ref_alpha(r, int'(ls), int'(la), int'(lp));
      for (int s = 0; s < 8; s++) begin
        checks++;
        if (int'(mo[s]) != e[s]) begin
          failures++;
          if (failures < 5) $display("FAIL: state %0d got %0d expected %0d", s, mo[s], e[s]);
        end
      end
    end
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
