// End-to-end test of the turbo decoder at a reduced frame size: N = 512
// (LTE QPP coefficients f1 = 31, f2 = 64), four parallel SISO decoders,
// windows of 16 steps. See tb_turbo_body.svh for what is checked.
module tb_turbo_decoder;
  localparam int N        = 512;
  localparam int P        = 4;
  localparam int W        = 16;
  localparam int F1       = 31;
  localparam int F2       = 64;
  localparam int MAX_ITER = 8;
  localparam int NFRAMES  = 5;

  `include "tb_turbo_body.svh"

  turbo_decoder #(.N(N), .P(P), .W(W), .MAX_ITER(MAX_ITER), .F1(F1), .F2(F2)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_sys, .in_par1, .in_par2,
    .out_valid, .out_bit, .out_last, .busy, .iters, .early_stop
  );
endmodule
