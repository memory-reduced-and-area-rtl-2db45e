// Checks the branch metric unit: gamma(u,p) = u*(Ls+La) + p*Lp for random
// and extreme LLRs.
module tb_branch_metric_unit;
  import turbo_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  llr_t ls, lp;
  ext_t la;
  bm_vec_t g;

  branch_metric_unit dut (.ls_i(ls), .la_i(la), .lp_i(lp), .gamma_o(g));

  initial begin
    for (int k = 0; k < 3000; k++) begin
      ls = (k == 0) ? -6'sd32 : llr_t'($urandom);
      la = (k == 0) ? -8'sd128 : (k == 1) ? 8'sd127 : ext_t'($urandom);
      lp = (k == 1) ? 6'sd31 : llr_t'($urandom);
      @(posedge clk);
      for (int u = 0; u < 2; u++)
        for (int p = 0; p < 2; p++) begin
          checks++;
          if (int'(g[u*2+p]) != gam(u, p, int'(ls), int'(la), int'(lp))) failures++;
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
