// MIN module of the NII compressor: one signed comparator and one
// multiplexer return the smaller of two state metrics and its state index.
// Combinational. Ties select input a.
module min_unit #(
  parameter int W  = turbo_pkg::SM_W,
  parameter int IW = turbo_pkg::IDX_W
) (
  input  logic signed [W-1:0]  a,
  input  logic [IW-1:0]        ia,
  input  logic signed [W-1:0]  b,
  input  logic [IW-1:0]        ib,
  output logic signed [W-1:0]  min_o,
  output logic [IW-1:0]        imin_o
);
  logic b_lt_a;

  always_comb begin
    b_lt_a = (b < a);
    min_o  = b_lt_a ? b  : a;
    imin_o = b_lt_a ? ib : ia;
  end
endmodule
