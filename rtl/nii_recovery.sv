// NII metric recovery.
//
// Rebuilds a full set of eight backward state metrics from one compressed
// NII word with a multiplexing network only: the state named by IMAX gets
// the stored range delta, the state named by IMIN gets 0, and every other
// state gets delta/2 (the mid-range value, a one-bit shift). The recovered
// set therefore keeps the exact spread between the most and least reliable
// states; the placement of the remaining states is this design's choice.
// The metrics are not re-normalised here: the backward recursion that uses
// them normalises its outputs to state 0. Combinational.
module nii_recovery
  import turbo_pkg::*;
(
  input  nii_t    nii_i,
  output sm_vec_t metrics_o
);
  sm_t full, half;

  always_comb begin
    full = sm_t'({1'b0, nii_i.delta});
    half = sm_t'({2'b00, nii_i.delta[DELTA_W-1:1]});
    for (int s = 0; s < NUM_STATES; s++) begin
      if (sidx_t'(s) == nii_i.imax)      metrics_o[s] = full;
      else if (sidx_t'(s) == nii_i.imin) metrics_o[s] = '0;
      else                               metrics_o[s] = half;
    end
  end
endmodule
