// Forward state metric unit (one add-compare-select step).
//
// alpha_{t+1}(s) = max over the two branches (s', u) that enter s of
// alpha_t(s') + gamma(u, p(s', u)), the max-log-MAP forward recursion on the
// 8-state LTE trellis. The new metrics are normalised by state 0, so
// alpha_{t+1}(0) = 0, and saturated to SM_W bits. Combinational.
module alpha_unit
  import turbo_pkg::*;
(
  input  sm_vec_t alpha_i,
  input  bm_vec_t gamma_i,
  output sm_vec_t alpha_o
);
  typedef logic signed [SM_W+3:0] wide_t;
  wide_t acc [NUM_STATES];
  wide_t cand;
  logic [2:0] ns;
  logic       p;

  always_comb begin
    for (int s = 0; s < NUM_STATES; s++) acc[s] = wide_t'(-(2 ** (SM_W + 2)));
    for (int sp = 0; sp < NUM_STATES; sp++) begin
      for (int u = 0; u < 2; u++) begin
        ns   = trellis_next(3'(sp), 1'(u));
        p    = trellis_parity(3'(sp), 1'(u));
        cand = wide_t'(alpha_i[sp]) + wide_t'(gamma_i[{1'(u), p}]);
        if (cand > acc[ns]) acc[ns] = cand;
      end
    end
    for (int s = 0; s < NUM_STATES; s++) alpha_o[s] = sat_sm(acc[s] - acc[0]);
  end
endmodule
