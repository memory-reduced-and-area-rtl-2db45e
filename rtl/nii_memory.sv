// NII metric memory of one SISO decoder.
//
// Holds one compressed NII word (delta, IMAX, IMIN: 14 bits) per sliding
// window and per decoding phase (in-order and interleaved). Entry x of a
// phase is the compressed backward state metric set found at the boundary
// at the end of window x, stored during one half-iteration and read to start
// the backward recursion of window x in the next half-iteration of the same
// phase. Two write ports: the decoder's own boundary results and the result
// handed over by the neighbouring segment's decoder for the last window.
// Both are never active together in the lockstep schedule (asserted); the
// own port wins if they were. Writes are synchronous, the read is
// asynchronous (a small register file).
module nii_memory
  import turbo_pkg::*;
#(
  parameter int NWIN = 24,                        // windows per segment
  localparam int AW  = (NWIN > 1) ? $clog2(NWIN) : 1
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic          wr_phase,
  input  logic [AW-1:0] wr_addr,
  input  nii_t          wr_data,
  input  logic          nbr_wr_en,
  input  logic          nbr_wr_phase,
  input  logic [AW-1:0] nbr_wr_addr,
  input  nii_t          nbr_wr_data,
  input  logic          rd_phase,
  input  logic [AW-1:0] rd_addr,
  output nii_t          rd_data
);
  nii_t mem [2][NWIN];

  always_ff @(posedge clk) begin
    if (wr_en)
      mem[wr_phase][wr_addr] <= wr_data;
    else if (nbr_wr_en)
      mem[nbr_wr_phase][nbr_wr_addr] <= nbr_wr_data;
  end

  assign rd_data = mem[rd_phase][rd_addr];

  a_one_writer: assert property (@(posedge clk) !(wr_en && nbr_wr_en))
    else $error("nii_memory: own and neighbour write in the same cycle");
endmodule
