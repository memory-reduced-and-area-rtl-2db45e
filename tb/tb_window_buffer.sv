// Checks the sliding-window buffer: a window of random words is written in
// order and read back in reverse order, as the backward recursion does.
module tb_window_buffer;
  localparam int DEPTH = 32, DATA_W = 128;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic              wr_en = 0;
  logic [4:0]        wr_addr = 0, rd_addr = 0;
  logic [DATA_W-1:0] wr_data = '0, rd_data;
  logic [DATA_W-1:0] model [DEPTH];

  window_buffer #(.DEPTH(DEPTH), .DATA_W(DATA_W)) dut (.*);

  initial begin
    for (int w = 0; w < 4; w++) begin
      for (int i = 0; i < DEPTH; i++) begin
        wr_en <= 1; wr_addr <= 5'(i);
        wr_data <= {$urandom, $urandom, $urandom, $urandom};
        @(posedge clk); #1;
        model[i] = wr_data;
      end
      wr_en <= 0;
      for (int i = DEPTH - 1; i >= 0; i--) begin
        rd_addr = 5'(i);
        #1;
        checks++;
        if (rd_data != model[i]) failures++;
        @(posedge clk);
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
