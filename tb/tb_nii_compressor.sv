// Checks the NII compressor against a reference search for maximum, minimum
// and their indexes (tie rules included) on random state metric sets with
// small ranges, ranges that clip, and sets with repeated values.
module tb_nii_compressor;
  import turbo_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_clip = 0;
  sm_vec_t m;
  nii_t    w;
  logic    clipped;

  nii_compressor dut (.metrics_i(m), .nii_o(w), .clipped_o(clipped));

  initial begin
    for (int k = 0; k < 4000; k++) begin
      mvec_t r;
      int d, imx, imn, spread;
      bit cl;
      spread = (k % 3 == 0) ? 8 : (k % 3 == 1) ? 200 : 1500;
      for (int s = 0; s < 8; s++) begin
        r[s] = int'($urandom_range(0, spread)) - spread / 2;
        m[s] = sm_t'(r[s]);
      end
      @(posedge clk);
      ref_compress(r, d, imx, imn, cl);
      if (cl) n_clip++;
      checks++;
      if (int'(w.delta) != d || int'(w.imax) != imx || int'(w.imin) != imn || clipped != cl) begin
        failures++;
        if (failures < 5) $display("FAIL: got d=%0d imax=%0d imin=%0d, expected %0d %0d %0d",
                                   w.delta, w.imax, w.imin, d, imx, imn);
      end
    end
    checks++;
    if (n_clip == 0) failures++;
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
