// Checks the turbo decoder controller with N = 16, P = 2, MAX_ITER = 3,
// the SISO array replaced by a model that answers each start with 'done'
// after a fixed delay and reports decision changes as scripted. Checked:
// load addresses, the order of half-iterations and their flags, early stop
// when an iteration changes nothing (including a change reported in the
// same cycle as 'done'), the iteration limit, and the read-out sequence.
module tb_turbo_controller;
  localparam int N = 16, P = 2, M = N / P, MAX_ITER = 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rst_n = 1'b0, in_valid = 1'b0, siso_done = 1'b0, dec_change = 1'b0;
  logic       in_ready, load_we, siso_start, phase, new_frame, first_half;
  logic       out_rd_en, out_valid, out_last, busy, early_stop_o;
  logic [0:0] load_bank, out_bank;
  logic [2:0] load_row, out_row;
  logic [1:0] iters_o;

  turbo_controller #(.N(N), .P(P), .MAX_ITER(MAX_ITER)) dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // mode 0: changes only in iteration 1; mode 1: always changes;
  // mode 2: iteration 2 changes only in the cycle of 'done'
  task automatic run_frame(input int mode, input int exp_iters, input bit exp_early);
    int k, it, half, nout;
    k = 0;
    while (k < N) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      #1;
      if (in_valid) begin
        chk(in_ready && load_we, "load accepted");
        chk(int'(load_bank) * M + int'(load_row) == k, "load address");
        k++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    half = 0;
    while (1) begin
      int wait_c;
      wait_c = 0;
      while (!siso_start && !out_rd_en && wait_c < 20) begin @(negedge clk); wait_c++; end
      if (!siso_start) break;
      it = half / 2 + 1;
      chk(phase == 1'(half % 2), "phase order");
      chk(new_frame == (half == 0) && first_half == (half == 0), "first half-iteration flags");
      repeat (4) @(negedge clk);
      if (phase && (mode == 1 || it == 1)) dec_change = 1'b1;
      @(negedge clk);
      dec_change = 1'b0;
      repeat (2) @(negedge clk);
      siso_done = 1'b1;
      if (phase && mode == 2 && it == 2) dec_change = 1'b1;
      @(negedge clk);
      siso_done = 1'b0;
      dec_change = 1'b0;
      half++;
    end
    chk(half == 2 * exp_iters, "number of half-iterations");
    chk(int'(iters_o) == exp_iters, "iteration count");
    chk(early_stop_o == exp_early, "early stop flag");
    nout = 0;
    for (int c = 0; c < 3 * N && nout < N; c++) begin
      if (out_valid) begin
        chk(out_last == (nout == N - 1), "out_last");
        nout++;
      end
      @(negedge clk);
    end
    chk(nout == N, "read-out length");
  endtask

  // read-out address order
  int rd_seq = 0;
  always @(posedge clk) begin
    if (out_rd_en) begin
      checks++;
      if (int'(out_bank) * M + int'(out_row) != rd_seq) failures++;
      rd_seq = (rd_seq + 1) % N;
    end
  end

  initial begin
    @(negedge clk);
    rst_n = 1'b1;
    run_frame(0, 2, 1'b1);
    run_frame(1, 3, 1'b0);
    run_frame(2, 3, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
