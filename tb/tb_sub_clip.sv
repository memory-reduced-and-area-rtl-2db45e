// Checks the SUB/CLIP unit: max - min for ordered random pairs, saturated to
// 255 with the clip flag, across small, boundary and large ranges.
module tb_sub_clip;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic signed [11:0] mx, mn;
  logic [7:0] delta;
  logic clipped;

  sub_clip dut (.max_i(mx), .min_i(mn), .delta_o(delta), .clipped_o(clipped));

  initial begin
    for (int k = 0; k < 3000; k++) begin
      int lo, d, exp_d;
      lo = int'($urandom_range(0, 3000)) - 2048;
      case (k % 4)
        0: d = int'($urandom_range(0, 255));
        1: d = 254 + int'($urandom_range(0, 3));
        default: d = int'($urandom_range(0, 4095));
      endcase
      if (lo + d > 2047) d = 2047 - lo;
      mn = 12'(lo); mx = 12'(lo + d);
      @(posedge clk);
      exp_d = (d > 255) ? 255 : d;
      checks++;
      if (int'(delta) != exp_d || clipped != (d > 255)) begin
        failures++;
        if (failures < 5) $display("FAIL: max=%0d min=%0d delta=%0d clip=%0d", mx, mn, delta, clipped);
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
