// Shared body of the end-to-end turbo decoder testbenches. The including
// module defines N, P, W, F1, F2, MAX_ITER, NFRAMES and instantiates the
// decoder as 'dut' with clk, rst_n and the port signals declared here.
//
// Each frame: random information bits are encoded by a reference LTE turbo
// encoder written here (two 8-state RSC encoders, 13/15 octal, QPP
// interleaver evaluated directly from its polynomial), sent as BPSK through
// an additive Gaussian noise channel, quantised to 6-bit LLRs, loaded into
// the decoder, decoded and compared bit by bit with the information bits.
// Frame 0 is noise-free at full LLR scale, the next frames have moderate
// noise (sigma 0.55, then 0.9 relative to the signal; they must decode
// without error), the last frame is so noisy that the decoder must run to
// its iteration limit. Checked besides: the output stream framing, the
// decoding latency against (2*iters) half-iterations of (M/W)*(2W+1)+3
// cycles plus 2, the half-iteration time, and that every mechanism occurred.

  localparam int M      = N / P;
  localparam int NWIN   = M / W;
  localparam int HALF   = NWIN * (2 * W + 1) + 3;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;     // reset edge before the first clock edge
  logic in_valid = 1'b0;
  logic in_ready;
  logic signed [5:0] in_sys = '0, in_par1 = '0, in_par2 = '0;
  logic out_valid, out_bit, out_last, busy, early_stop;
  logic [$clog2(MAX_ITER+1)-1:0] iters;

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  bit  u    [N];
  bit  p1   [N];
  bit  p2   [N];
  int  pi_a [N];
  logic signed [5:0] q_s [N];
  logic signed [5:0] q_1 [N];
  logic signed [5:0] q_2 [N];

  // mechanism counters
  int n_early = 0, n_maxit = 0, n_corrected = 0, n_late = 0;
  int n_store [P];
  int n_load  [P];
  int n_clip  [P];
  int n_nbr   [P];
  int n_alpha [P];
  int n_xbar  [P];

  for (genvar j = 0; j < P; j++) begin : g_mon
    initial begin
      n_store[j] = 0; n_load[j] = 0; n_clip[j] = 0; n_nbr[j] = 0; n_alpha[j] = 0; n_xbar[j] = 0;
    end
    always @(posedge clk) begin
      if (dut.g_dec[j].u_siso.ev_nii_store) n_store[j]++;
      if (dut.g_dec[j].u_siso.ev_nii_load)  n_load[j]++;
      if (dut.g_dec[j].u_siso.ev_nii_clip)  n_clip[j]++;
      if (dut.g_dec[j].u_siso.nii_prev_wr && j > 0) n_nbr[j]++;
      if (dut.g_dec[j].u_siso.start && dut.g_dec[j].u_siso.alpha_init_valid_i
          && !dut.g_dec[j].u_siso.new_frame && j > 0) n_alpha[j]++;
      if (dut.g_dec[j].u_siso.rd_en && dut.phase && dut.q_bank[j] != j) n_xbar[j]++;
    end
  end

  // half-iteration timing
  int hstart = 0, cyc = 0, n_half = 0, half_bad = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.siso_start) hstart = cyc;
    if (dut.g_dec[0].u_siso.done) begin
      n_half++;
      if (cyc - hstart != NWIN * (2 * W + 1) + 1) half_bad++;
    end
  end

  function automatic real gauss();
    real s = 0.0;
    for (int k = 0; k < 12; k++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  function automatic logic signed [5:0] quant(input bit b, input real amp, input real sigma);
    real y;
    int  q;
    y = (b ? amp : -amp) + amp * sigma * gauss();
    q = $rtoi(y < 0.0 ? y - 0.5 : y + 0.5);
    if (q > 31)  q = 31;
    if (q < -31) q = -31;
    return 6'(q);
  endfunction

  task automatic rsc_encode(input bit din [N], output bit par [N]);
    bit d1, d2, d3, a;
    d1 = 0; d2 = 0; d3 = 0;
    for (int i = 0; i < N; i++) begin
      a      = din[i] ^ d2 ^ d3;
      par[i] = a ^ d1 ^ d3;
      d3 = d2; d2 = d1; d1 = a;
    end
  endtask

  task automatic run_frame(input int f, input real amp, input real sigma, input bit must_decode, input bit must_max);
    bit  uin [N];
    int  errs, raw, nout, t0, t1;
    bit  got_last;
    for (int i = 0; i < N; i++) u[i] = 1'($urandom);
    for (int i = 0; i < N; i++) uin[i] = u[pi_a[i]];
    rsc_encode(u, p1);
    rsc_encode(uin, p2);
    raw = 0;
    for (int i = 0; i < N; i++) begin
      q_s[i] = quant(u[i], amp, sigma);
      q_1[i] = quant(p1[i], amp, sigma);
      q_2[i] = quant(p2[i], amp, sigma);
      if ((q_s[i] > 0) != u[i]) raw++;
    end
    // load
    for (int i = 0; i < N; i++) begin
      in_valid <= 1'b1;
      in_sys   <= q_s[i];
      in_par1  <= q_1[i];
      in_par2  <= q_2[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0;
    t0 = cyc;
    // collect
    errs = 0; nout = 0; got_last = 0;
    while (nout < N) begin
      @(posedge clk);
      if (out_valid) begin
        if (nout == 0) t1 = cyc;
        if (out_bit != u[nout]) errs++;
        if (out_last) got_last = (nout == N - 1);
        nout++;
      end
    end
    @(posedge clk);
    $display("frame %0d amp=%0.1f sigma=%0.2f raw_errors=%0d errors=%0d iterations=%0d early_stop=%0d latency=%0d",
             f, amp, sigma, raw, errs, iters, early_stop, t1 - t0);
    checks++;
    if (!got_last) begin failures++; $display("FAIL: out_last misplaced"); end
    checks++;
    if (t1 - t0 != 2 * int'(iters) * HALF + 2) begin
      failures++; $display("FAIL: latency %0d expected %0d", t1 - t0, 2 * int'(iters) * HALF + 2);
    end
    checks++;
    if (early_stop != (int'(iters) < MAX_ITER)) begin failures++; $display("FAIL: early_stop flag"); end
    checks++;
    if (int'(iters) < 1 || int'(iters) > MAX_ITER) begin failures++; $display("FAIL: iteration count"); end
    if (must_decode) begin
      checks++;
      if (errs != 0) begin failures++; $display("FAIL: %0d bit errors", errs); end
      if (raw > 0 && errs == 0) n_corrected++;
    end
    if (must_max) begin
      checks++;
      if (int'(iters) != MAX_ITER) begin failures++; $display("FAIL: noisy frame stopped early"); end
    end
    if (early_stop) n_early++;
    if (early_stop && int'(iters) > 2) n_late++;
    if (int'(iters) == MAX_ITER) n_maxit++;
  endtask

  task automatic require(input string what, input int count);
    checks++;
    $display("mechanism %-28s %0d", what, count);
    if (count == 0) begin failures++; $display("FAIL: %s never happened", what); end
  endtask

  int s_store = 0, s_load = 0, s_clip = 0, s_nbr = 0, s_alpha = 0, s_xbar = 0;

  initial begin
    void'($urandom(32'd2024));   // fixed seed: reproducible frames
    for (int i = 0; i < N; i++) pi_a[i] = int'((longint'(F1) * i + (longint'(F2) * i % longint'(N)) * i) % longint'(N));
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      if (f == 0)                run_frame(f, 30.0, 0.0, 1'b1, 1'b0);
      else if (f < NFRAMES - 1)  run_frame(f, 6.0, (f == 1) ? 0.55 : 0.9, 1'b1, 1'b0);
      else                       run_frame(f, 6.0, 3.0, 1'b0, 1'b1);
    end
    for (int j = 0; j < P; j++) begin
      s_store += n_store[j]; s_load += n_load[j]; s_clip += n_clip[j];
      s_nbr += n_nbr[j]; s_alpha += n_alpha[j]; s_xbar += n_xbar[j];
    end
    checks++;
    if (half_bad != 0) begin failures++; $display("FAIL: %0d half-iterations off time", half_bad); end
    require("early stop", n_early);
    require("iteration limit", n_maxit);
    require("early stop after 3+ iterations", n_late);
    require("channel errors corrected", n_corrected);
    require("NII store", s_store);
    require("NII load (recovered)", s_load);
    require("NII range clipped", s_clip);
    if (P > 1) begin
      require("NII hand-over to neighbour", s_nbr);
      require("alpha hand-over", s_alpha);
      require("interleaved cross-bank read", s_xbar);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFRAMES * (3 * N + 2 * MAX_ITER * HALF + 100)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
