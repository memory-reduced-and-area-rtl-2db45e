// Extrinsic LLR unit of one trellis step (max-log-MAP).
//
// For each hypothesis u of the systematic bit it takes the best path metric
// through a branch carrying u, alpha_t(s') + p(s',u)*Lp + beta_{t+1}(next),
// and outputs the difference (u = 1 minus u = 0), saturated to EXT_W bits.
// The systematic and a-priori parts of the branch metric are common to all
// branches with the same u, so they are left out: the result is the
// extrinsic information, and the a-posteriori LLR is Ls + La + Le.
// Combinational.
module llr_unit
  import turbo_pkg::*;
(
  input  sm_vec_t alpha_i,    // alpha_t
  input  sm_vec_t beta_i,     // beta_{t+1}
  input  llr_t    lp_i,       // parity LLR of step t
  output ext_t    ext_o
);
  typedef logic signed [SM_W+3:0] wide_t;
  wide_t best [2];
  wide_t cand;
  logic [2:0] ns;
  logic       p;

  always_comb begin
    best[0] = wide_t'(-(2 ** (SM_W + 2)));
    best[1] = wide_t'(-(2 ** (SM_W + 2)));
    for (int sp = 0; sp < NUM_STATES; sp++) begin
      for (int u = 0; u < 2; u++) begin
        ns   = trellis_next(3'(sp), 1'(u));
        p    = trellis_parity(3'(sp), 1'(u));
        cand = wide_t'(alpha_i[sp]) + wide_t'(beta_i[ns]) + (p ? wide_t'(lp_i) : wide_t'(0));
        if (cand > best[u]) best[u] = cand;
      end
    end
    ext_o = sat_ext(best[1] - best[0]);
  end
endmodule
