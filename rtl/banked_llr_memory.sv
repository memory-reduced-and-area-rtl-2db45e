// Banked LLR memory with read and write crossbars.
//
// P banks of M words of DW bits; address = bank*M + row. Each of the P ports
// (one per parallel SISO decoder) can read and write any bank. Per bank, the
// write of the port that addresses it is selected, and the row of the port
// that reads it; the read data then return through a crossbar to the
// requesting ports. Ports must never address the same bank in one cycle
// (the QPP interleaver guarantees this; asserted while
// rst_n is high; the memory itself has no reset). The read is synchronous:
// rd_data is valid the cycle after rd_en. wr_old returns, in the same cycle,
// the word a write is about to overwrite (used for change detection).
// A read and a write of the same word in one cycle return the old word.
module banked_llr_memory #(
  parameter int P  = 8,
  parameter int M  = 768,
  parameter int DW = 8,
  localparam int BW = (P > 1) ? $clog2(P) : 1,
  localparam int RW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,    // only gates the assertions
  input  logic [P-1:0]          rd_en,
  input  logic [P-1:0][BW-1:0]  rd_bank,
  input  logic [P-1:0][RW-1:0]  rd_row,
  output logic [P-1:0][DW-1:0]  rd_data,
  input  logic [P-1:0]          wr_en,
  input  logic [P-1:0][BW-1:0]  wr_bank,
  input  logic [P-1:0][RW-1:0]  wr_row,
  input  logic [P-1:0][DW-1:0]  wr_data,
  output logic [P-1:0][DW-1:0]  wr_old
);
  logic [P-1:0]          b_we;
  logic [P-1:0][RW-1:0]  b_wrow;
  logic [P-1:0][DW-1:0]  b_wdata;
  logic [P-1:0][RW-1:0]  b_rrow;
  logic [P-1:0][DW-1:0]  b_q;
  logic [P-1:0][DW-1:0]  b_old;
  logic [P-1:0][BW-1:0]  rd_bank_q;

  // Bank-side selection: which port writes / reads each bank.
  always_comb begin
    for (int b = 0; b < P; b++) begin
      b_we[b]    = 1'b0;
      b_wrow[b]  = '0;
      b_wdata[b] = '0;
      b_rrow[b]  = '0;
      for (int j = 0; j < P; j++) begin
        if (wr_en[j] && wr_bank[j] == BW'(b)) begin
          b_we[b]    = 1'b1;
          b_wrow[b]  = wr_row[j];
          b_wdata[b] = wr_data[j];
        end
        if (rd_en[j] && rd_bank[j] == BW'(b)) b_rrow[b] = rd_row[j];
      end
    end
  end

  // One single-port-write memory per bank.
  for (genvar b = 0; b < P; b++) begin : g_bank
    logic [DW-1:0] mem [M];
    logic [DW-1:0] q;

    always_ff @(posedge clk) begin
      if (b_we[b]) mem[b_wrow[b]] <= b_wdata[b];
      q <= mem[b_rrow[b]];
    end

    assign b_q[b]   = q;
    assign b_old[b] = mem[b_wrow[b]];
  end

  always_ff @(posedge clk) rd_bank_q <= rd_bank;

  // Port-side crossbars.
  always_comb begin
    for (int j = 0; j < P; j++) begin
      rd_data[j] = b_q[rd_bank_q[j]];
      wr_old[j]  = b_old[wr_bank[j]];
    end
  end

  // At most one port per bank and cycle.
  function automatic logic collide(input logic [P-1:0] en, input logic [P-1:0][BW-1:0] bank);
    logic c;
    c = 1'b0;
    for (int i = 0; i < P; i++)
      for (int k = i + 1; k < P; k++)
        if (en[i] && en[k] && bank[i] == bank[k]) c = 1'b1;
    return c;
  endfunction

  a_rd_conflict_free: assert property (@(posedge clk) disable iff (!rst_n) !collide(rd_en, rd_bank))
    else $error("banked_llr_memory: two reads address one bank");
  a_wr_conflict_free: assert property (@(posedge clk) disable iff (!rst_n) !collide(wr_en, wr_bank))
    else $error("banked_llr_memory: two writes address one bank");
endmodule
