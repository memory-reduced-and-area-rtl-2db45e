// SUB/CLIP unit of the NII compressor.
//
// Subtracts the minimum state metric from the maximum one and saturates the
// non-negative difference to DELTA_W bits (8 bits in the document: ranges
// beyond that are clipped). clipped_o flags a saturated result.
// Combinational; max_i >= min_i is expected.
module sub_clip #(
  parameter int W       = turbo_pkg::SM_W,
  parameter int DELTA_W = turbo_pkg::DELTA_W
) (
  input  logic signed [W-1:0]  max_i,
  input  logic signed [W-1:0]  min_i,
  output logic [DELTA_W-1:0]   delta_o,
  output logic                 clipped_o
);
  logic signed [W:0] diff;

  always_comb begin
    diff = (W+1)'(max_i) - (W+1)'(min_i);
    if (diff > (W+1)'((2 ** DELTA_W) - 1)) begin
      delta_o   = '1;
      clipped_o = 1'b1;
    end else if (diff < 0) begin
      delta_o   = '0;
      clipped_o = 1'b1;
    end else begin
      delta_o   = DELTA_W'(diff);
      clipped_o = 1'b0;
    end
  end
endmodule
