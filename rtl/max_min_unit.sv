// MAX-MIN module of the NII compressor.
//
// One signed comparator decides which of two state metrics is larger; two
// multiplexers then route the larger one to the max output and the smaller
// one to the min output. The state index travels with each value, selected by
// the same comparison result, so that the indexes of the overall maximum and
// minimum fall out of the comparisons already made. Purely combinational.
// Ties give the max to input a and the min to input b.
module max_min_unit #(
  parameter int W  = turbo_pkg::SM_W,
  parameter int IW = turbo_pkg::IDX_W
) (
  input  logic signed [W-1:0]  a,
  input  logic [IW-1:0]        ia,
  input  logic signed [W-1:0]  b,
  input  logic [IW-1:0]        ib,
  output logic signed [W-1:0]  max_o,
  output logic [IW-1:0]        imax_o,
  output logic signed [W-1:0]  min_o,
  output logic [IW-1:0]        imin_o
);
  logic b_gt_a;

  always_comb begin
    b_gt_a = (b > a);
    max_o  = b_gt_a ? b  : a;
    imax_o = b_gt_a ? ib : ia;
    min_o  = b_gt_a ? a  : b;
    imin_o = b_gt_a ? ia : ib;
  end
endmodule
