// MAX module of the NII compressor: one signed comparator and one
// multiplexer return the larger of two state metrics and its state index.
// Combinational. Ties select input a.
module max_unit #(
  parameter int W  = turbo_pkg::SM_W,
  parameter int IW = turbo_pkg::IDX_W
) (
  input  logic signed [W-1:0]  a,
  input  logic [IW-1:0]        ia,
  input  logic signed [W-1:0]  b,
  input  logic [IW-1:0]        ib,
  output logic signed [W-1:0]  max_o,
  output logic [IW-1:0]        imax_o
);
  logic b_gt_a;

  always_comb begin
    b_gt_a = (b > a);
    max_o  = b_gt_a ? b  : a;
    imax_o = b_gt_a ? ib : ia;
  end
endmodule
