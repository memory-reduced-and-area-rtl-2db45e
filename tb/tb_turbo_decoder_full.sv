// End-to-end test of the turbo decoder with every parameter at its default:
// 6144-bit frames, eight parallel SISO decoders, 32-step windows, at most
// eight iterations. Four frames: noise-free at full LLR scale, two with
// moderate noise, and a very noisy frame that runs to the iteration limit. See
// tb_turbo_body.svh for what is checked.
module tb_turbo_decoder_full;
  localparam int N        = 6144;
  localparam int P        = 8;
  localparam int W        = 32;
  localparam int F1       = 263;
  localparam int F2       = 480;
  localparam int MAX_ITER = 8;
  localparam int NFRAMES  = 4;

  `include "tb_turbo_body.svh"

  turbo_decoder dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_sys, .in_par1, .in_par2,
    .out_valid, .out_bit, .out_last, .busy, .iters, .early_stop
  );
endmodule
