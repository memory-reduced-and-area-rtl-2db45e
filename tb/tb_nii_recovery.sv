// Checks the NII recovery network: for random (delta, IMAX, IMIN) words the
// state IMAX must get delta, IMIN 0 and every other state delta/2.
module tb_nii_recovery;
  import turbo_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  nii_t    w;
  sm_vec_t m;

  nii_recovery dut (.nii_i(w), .metrics_o(m));

  initial begin
    for (int k = 0; k < 3000; k++) begin
      mvec_t r;
      w.delta = 8'($urandom);
      w.imax  = 3'($urandom);
      w.imin  = (k % 8 == 0) ? w.imax : 3'($urandom);
      @(posedge clk);
      r = ref_recover(int'(w.delta), int'(w.imax), int'(w.imin));
      for (int s = 0; s < 8; s++) begin
        checks++;
        if (int'(m[s]) != r[s]) failures++;
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
