// Checks the recursive QPP address generator at the LTE size N = 6144
// (f1 = 263, f2 = 480): eight generators starting at j*768 are stepped
// through their whole segments and compared with the polynomial evaluated
// directly; at every step the eight addresses must share one row and use
// eight different banks (collision-free parallel access). A generator with
// an arbitrary start and a restart in mid-sequence are checked too.
module tb_qpp_interleaver;
  localparam int N = 6144, P = 8, M = N / P, F1 = 263, F2 = 480, S9 = 1234;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n = 1'b0, restart = 1'b0, advance = 1'b0;
  logic [P:0][2:0] bank;
  logic [P:0][9:0] row;

  for (genvar j = 0; j <= P; j++) begin : g_gen
    qpp_interleaver #(.N(N), .P(P), .F1(F1), .F2(F2), .START((j == P) ? S9 : j * M)) u_qpp (
      .clk, .rst_n, .restart, .advance, .bank_o(bank[j]), .row_o(row[j]));
  end

  function automatic int qpp(input int i);
    return int'((longint'(F1) * i + longint'(F2) * i * i) % longint'(N));
  endfunction

  task automatic check_step(input int t);
    bit [P-1:0] used;
    used = '0;
    for (int j = 0; j <= P; j++) begin
      int exp_a;
      exp_a = qpp(((j == P) ? S9 : j * M) + t);
      checks++;
      if (int'(bank[j]) * M + int'(row[j]) != exp_a) begin
        failures++;
        if (failures < 5) $display("FAIL: gen %0d step %0d got %0d expected %0d", j, t,
                                   int'(bank[j]) * M + int'(row[j]), exp_a);
      end
    end
    for (int j = 0; j < P; j++) used[bank[j]] = 1'b1;
    checks++;
    if (used != '1) failures++;
    for (int j = 1; j < P; j++) begin
      checks++;
      if (row[j] != row[0]) failures++;
    end
  endtask

  initial begin
    @(negedge clk);
    rst_n = 1'b1;
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    for (int t = 0; t < M; t++) begin
      check_step(t);
      if (t == 100) begin
        // restart in the middle, then run from the start again
        restart = 1'b1;
        @(negedge clk);
        restart = 1'b0;
        for (int r = 0; r <= 100; r++) begin
          check_step(r);
          advance = 1'b1;
          @(negedge clk);
          advance = 1'b0;
        end
        t = 100;
        check_step(101);
        t = 101;
      end
      advance = 1'b1;
      @(negedge clk);
      advance = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
