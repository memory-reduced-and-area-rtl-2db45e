// Backward state metric unit (one add-compare-select step).
//
// beta_t(s') = max over u of gamma(u, p(s', u)) + beta_{t+1}(next(s', u)),
// the max-log-MAP backward recursion on the 8-state LTE trellis. The new
// metrics are normalised by state 0, so beta_t(0) = 0, and saturated to SM_W
// bits. Combinational.
module beta_unit
  import turbo_pkg::*;
(
  input  sm_vec_t beta_i,     // beta_{t+1}
  input  bm_vec_t gamma_i,    // branch metrics of step t
  output sm_vec_t beta_o      // beta_t
);
  typedef logic signed [SM_W+3:0] wide_t;
  wide_t acc [NUM_STATES];
  wide_t cand;
  logic [2:0] ns;
  logic       p;

  always_comb begin
    for (int sp = 0; sp < NUM_STATES; sp++) begin
      acc[sp] = wide_t'(-(2 ** (SM_W + 2)));
      for (int u = 0; u < 2; u++) begin
        ns   = trellis_next(3'(sp), 1'(u));
        p    = trellis_parity(3'(sp), 1'(u));
        cand = wide_t'(beta_i[ns]) + wide_t'(gamma_i[{1'(u), p}]);
        if (cand > acc[sp]) acc[sp] = cand;
      end
    end
    for (int s = 0; s < NUM_STATES; s++) beta_o[s] = sat_sm(acc[s] - acc[0]);
  end
endmodule
