// Checks the MAX module against direct comparison on random and equal
// inputs, including the tie rule (a wins).
module tb_max_unit;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic signed [11:0] a, b, mx;
  logic [2:0] ia, ib, imx;

  max_unit dut (.a, .ia, .b, .ib, .max_o(mx), .imax_o(imx));

  initial begin
    for (int k = 0; k < 2000; k++) begin
      a  = 12'($urandom);
      b  = (k % 10 == 0) ? a : 12'($urandom);
      ia = 3'($urandom); ib = 3'($urandom);
      @(posedge clk);
      checks++;
      if ($signed(b) > $signed(a)) begin
        if (mx != b || imx != ib) failures++;
      end else begin
        if (mx != a || imx != ia) failures++;
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
