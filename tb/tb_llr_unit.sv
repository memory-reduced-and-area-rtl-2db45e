// Checks the extrinsic LLR unit against the reference max-log-MAP
// extrinsic value (saturated to 8 bits) for random forward/backward metric
// sets and parity LLRs.
module tb_llr_unit;
  import turbo_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_sat = 0;
  sm_vec_t a, b;
  llr_t    lp;
  ext_t    e;

  llr_unit dut (.alpha_i(a), .beta_i(b), .lp_i(lp), .ext_o(e));

  initial begin
    for (int k = 0; k < 3000; k++) begin
      mvec_t ra, rb;
      int spread, x;
      spread = (k % 4 == 0) ? 1000 : 200;
      for (int s = 0; s < 8; s++) begin
        ra[s] = int'($urandom_range(0, spread)) - spread / 2;
        rb[s] = int'($urandom_range(0, spread)) - spread / 2;
        a[s] = sm_t'(ra[s]); b[s] = sm_t'(rb[s]);
      end
      lp = llr_t'($urandom);
      @(posedge clk);
      x = ref_ext(ra, rb, int'(lp));
      if (x == 127 || x == -128) n_sat++;
      checks++;
      if (int'(e) != x) begin
        failures++;
        if (failures < 5) $display("FAIL: got %0d expected %0d", e, x);
      end
    end
    checks++;
    if (n_sat == 0) failures++;
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
