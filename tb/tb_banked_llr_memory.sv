// Checks the banked memory with P = 4 banks of 16 words: fills it through
// all ports at once with a random bank permutation per row, reads it back
// through permuted ports (data one cycle after the request), and checks the
// old-word output of overwriting writes.
module tb_banked_llr_memory;
  localparam int P = 4, M = 16, DW = 8;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [P-1:0]          rd_en = '0, wr_en = '0;
  logic [P-1:0][1:0]     rd_bank = '0, wr_bank = '0;
  logic [P-1:0][3:0]     rd_row = '0, wr_row = '0;
  logic [P-1:0][DW-1:0]  rd_data, wr_data = '0, wr_old;
  logic [DW-1:0]         model [P][M];

  banked_llr_memory #(.P(P), .M(M), .DW(DW)) dut (.*);

  task automatic perm(output logic [P-1:0][1:0] pb);
    int a [P];
    for (int i = 0; i < P; i++) a[i] = i;
    for (int i = P - 1; i > 0; i--) begin
      int k, t;
      k = int'($urandom_range(0, i));
      t = a[i]; a[i] = a[k]; a[k] = t;
    end
    for (int i = 0; i < P; i++) pb[i] = 2'(a[i]);
  endtask

  initial begin
    for (int pass = 0; pass < 3; pass++) begin
      // write every row with all ports
      for (int r = 0; r < M; r++) begin
        @(negedge clk);
        rd_en = '0;
        perm(wr_bank);
        wr_en = '1;
        for (int j = 0; j < P; j++) begin
          wr_row[j]  = 4'(r);
          wr_data[j] = DW'($urandom);
        end
        #1;
        if (pass > 0)
          for (int j = 0; j < P; j++) begin
            checks++;
            if (wr_old[j] != model[wr_bank[j]][r]) failures++;
          end
        for (int j = 0; j < P; j++) model[wr_bank[j]][r] = wr_data[j];
      end
      @(negedge clk);
      wr_en = '0;
      // read back
      for (int r = 0; r < M; r++) begin
        logic [P-1:0][1:0] pb;
        @(negedge clk);
        perm(pb);
        rd_bank = pb;
        rd_en = '1;
        for (int j = 0; j < P; j++) rd_row[j] = 4'(r);
        @(negedge clk);
        rd_en = '0;
        rd_bank = ~pb;
        #1;
        for (int j = 0; j < P; j++) begin
          checks++;
          if (rd_data[j] != model[pb[j]][r]) failures++;
        end
      end
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
