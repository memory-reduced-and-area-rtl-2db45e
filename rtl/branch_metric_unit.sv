// Branch metric unit for one trellis step of the max-log-MAP decoder.
//
// With a positive LLR favouring bit 1, the log-domain metric of a branch
// carrying systematic bit u and parity bit p is, up to a constant common to
// all branches of the step, gamma(u,p) = u*(Ls + La) + p*Lp, where Ls is the
// systematic channel LLR, La the a-priori (extrinsic) LLR and Lp the parity
// channel LLR. The unit outputs the four values, indexed by {u, p}.
// Combinational.
module branch_metric_unit
  import turbo_pkg::*;
(
  input  llr_t    ls_i,
  input  ext_t    la_i,
  input  llr_t    lp_i,
  output bm_vec_t gamma_o
);
  bm_t g_sys, g_par;

  always_comb begin
    g_sys = bm_t'(ls_i) + bm_t'(la_i);
    g_par = bm_t'(lp_i);
    gamma_o[0] = '0;              // u = 0, p = 0
    gamma_o[1] = g_par;           // u = 0, p = 1
    gamma_o[2] = g_sys;           // u = 1, p = 0
    gamma_o[3] = g_sys + g_par;   // u = 1, p = 1
  end
endmodule
