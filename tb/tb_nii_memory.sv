// Checks the NII memory: fills both phases through the own and the
// neighbour write port, then reads every entry back; a second pass
// overwrites half of the entries and checks that only they changed.
module tb_nii_memory;
  import turbo_pkg::*;
  localparam int NWIN = 24;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic       wr_en = 0, wr_phase = 0, nbr_wr_en = 0, nbr_wr_phase = 0, rd_phase = 0;
  logic [4:0] wr_addr = 0, nbr_wr_addr = 0, rd_addr = 0;
  nii_t       wr_data = '0, nbr_wr_data = '0, rd_data;
  nii_t       model [2][NWIN];

  nii_memory #(.NWIN(NWIN)) dut (.*);

  task automatic check_all();
    for (int ph = 0; ph < 2; ph++)
      for (int a = 0; a < NWIN; a++) begin
        @(negedge clk);
        rd_phase = 1'(ph); rd_addr = 5'(a);
        #1;
        checks++;
        if (rd_data != model[ph][a]) begin
          failures++;
          if (failures < 4) $display("FAIL: phase %0d entry %0d got %h expected %h", ph, a, rd_data, model[ph][a]);
        end
      end
  endtask

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int ph = 0; ph < 2; ph++)
        for (int a = 0; a < NWIN; a++) begin
          if (pass == 1 && a % 2 == 0) continue;
          @(negedge clk);
          wr_en = 0; nbr_wr_en = 0;
          if (a == NWIN - 1) begin
            nbr_wr_en = 1; nbr_wr_phase = 1'(ph); nbr_wr_addr = 5'(a);
            nbr_wr_data = 14'($urandom);
            model[ph][a] = nbr_wr_data;
          end else begin
            wr_en = 1; wr_phase = 1'(ph); wr_addr = 5'(a);
            wr_data = 14'($urandom);
            model[ph][a] = wr_data;
          end
        end
      @(negedge clk);
      wr_en = 0; nbr_wr_en = 0;
      check_all();
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
