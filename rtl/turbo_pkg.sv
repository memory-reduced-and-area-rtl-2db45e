// Shared types, widths and trellis description of the turbo decoder.
//
// The constituent code is the 8-state recursive systematic convolutional
// code of LTE: feedback polynomial 1 + D^2 + D^3 and feed-forward polynomial
// 1 + D + D^3. A state is the 3-bit content {d1, d2, d3} of the encoder shift
// register, d1 in bit 2. With input bit u the feedback bit is a = u ^ d2 ^ d3,
// the parity bit is a ^ d1 ^ d3 and the next state is {a, d1, d2}.
//
// Word lengths: the state metric width (12 bits) and the stored range width
// (8 bits) follow the document. The channel LLR width (6 bits), the extrinsic
// width (8 bits) and the branch metric width are this design's choices.
// LLR sign convention: a positive value favours bit 1.
package turbo_pkg;

  localparam int NUM_STATES = 8;                // k
  localparam int IDX_W      = 3;                // log2(k): width of IMAX / IMIN
  localparam int SM_W       = 12;               // d: state metric width
  localparam int DELTA_W    = 8;                // width of the stored range
  localparam int LLR_W      = 6;                // channel LLR width
  localparam int EXT_W      = 8;                // extrinsic LLR width
  localparam int BM_W       = 10;               // branch metric width
  localparam int APP_W      = 10;               // a-posteriori LLR width

  // Metric given to states that cannot be the starting state.
  localparam int SM_NEG_INF = -(1 << (SM_W - 2));

  typedef logic signed [SM_W-1:0]    sm_t;
  typedef logic signed [LLR_W-1:0]   llr_t;
  typedef logic signed [EXT_W-1:0]   ext_t;
  typedef logic signed [BM_W-1:0]    bm_t;
  typedef logic signed [APP_W-1:0]   app_t;
  typedef logic [IDX_W-1:0]          sidx_t;

  // One set of state metrics, index = state.
  typedef sm_t [NUM_STATES-1:0] sm_vec_t;

  // Branch metrics indexed by {u, p}.
  typedef bm_t [3:0] bm_vec_t;

  // Compressed next-iteration-initialisation (NII) word.
  typedef struct packed {
    logic [DELTA_W-1:0] delta;
    sidx_t              imax;
    sidx_t              imin;
  } nii_t;


  function automatic logic [2:0] trellis_next(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return {a, s[2], s[1]};
  endfunction

  function automatic logic trellis_parity(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return a ^ s[2] ^ s[0];
  endfunction

  // Saturate a wide signed value to the state metric width.
  function automatic sm_t sat_sm(input logic signed [SM_W+3:0] v);
    if (v > (2 ** (SM_W - 1)) - 1) return sm_t'((2 ** (SM_W - 1)) - 1);
    if (v < -(2 ** (SM_W - 1)))    return sm_t'(-(2 ** (SM_W - 1)));
    return sm_t'(v);
  endfunction

  // Saturate a wide signed value to the extrinsic width.
  function automatic ext_t sat_ext(input logic signed [SM_W+3:0] v);
    if (v > (2 ** (EXT_W - 1)) - 1) return ext_t'((2 ** (EXT_W - 1)) - 1);
    if (v < -(2 ** (EXT_W - 1)))    return ext_t'(-(2 ** (EXT_W - 1)));
    return ext_t'(v);
  endfunction

endpackage
