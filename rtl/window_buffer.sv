// Sliding-window buffer.
//
// Stores, for each trellis step of the current window, the forward state
// metrics and the step's inputs written during the forward recursion, so that
// the backward recursion can read them back in reverse order. DEPTH is the
// window length w (32). One synchronous write port and one asynchronous read
// port (a register file).
module window_buffer #(
  parameter int DEPTH  = 32,
  parameter int DATA_W = 128,
  localparam int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  input  logic [AW-1:0]     rd_addr,
  output logic [DATA_W-1:0] rd_data
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (wr_en) mem[wr_addr] <= wr_data;

  assign rd_data = mem[rd_addr];
endmodule
