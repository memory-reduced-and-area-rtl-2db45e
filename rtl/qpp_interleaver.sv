// Recursive QPP interleaver address generator.
//
// Produces the LTE quadratic permutation polynomial addresses
//   pi(i) = (F1*i + F2*i^2) mod N
// for i = START, START+1, ... one per 'advance', without multipliers:
//   pi(i+1) = pi(i) + g(i),  g(i+1) = g(i) + 2*F2   (all mod N).
// Addresses are kept in the form (bank, row) with address = bank*M + row,
// M = N/P, which is the layout of the banked LLR memories: each of the P
// parallel decoders owns one bank of M consecutive addresses. For a QPP and
// M dividing N, the P addresses pi(j*M + t), j = 0..P-1, share one row and
// fall into P different banks, so parallel access is free of collisions.
// The same addresses serve for deinterleaving: results are written back to
// the address they were read from.
// 'restart' loads pi(START) and g(START) (computed at elaboration); the
// outputs are registered and valid from the cycle after 'restart'.
// Defaults: N = 6144, F1 = 263, F2 = 480 (LTE table entry for K = 6144).
module qpp_interleaver #(
  parameter int N     = 6144,
  parameter int P     = 8,
  parameter int F1    = 263,
  parameter int F2    = 480,
  parameter int START = 0,
  localparam int M    = N / P,
  localparam int BW   = (P > 1) ? $clog2(P) : 1,
  localparam int RW   = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          restart,
  input  logic          advance,
  output logic [BW-1:0] bank_o,
  output logic [RW-1:0] row_o
);
  localparam longint NL  = longint'(N);
  localparam longint ML  = longint'(M);
  localparam longint PI0 = ((longint'(F1) * START) % NL + ((longint'(F2) * START) % NL) * START) % NL;
  localparam longint G0  = (longint'(F1) + (longint'(F2) * (2 * longint'(START) + 1)) % NL) % NL;
  localparam longint D   = (2 * longint'(F2)) % NL;

  logic [BW-1:0] g_bank;
  logic [RW-1:0] g_row;

  // (b1, r1) + (b2, r2) mod N in bank/row form.
  function automatic logic [BW+RW-1:0] add_mod(input logic [BW-1:0] b1, input logic [RW-1:0] r1,
                                               input logic [BW-1:0] b2, input logic [RW-1:0] r2);
    logic [RW:0] rs;
    logic [BW:0] bs;
    rs = {1'b0, r1} + {1'b0, r2};
    bs = {1'b0, b1} + {1'b0, b2};
    if (rs >= (RW+1)'(M)) begin
      rs = rs - (RW+1)'(M);
      bs = bs + 1'b1;
    end
    if (bs >= (BW+1)'(P)) bs = bs - (BW+1)'(P);
    return {bs[BW-1:0], rs[RW-1:0]};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank_o <= BW'(PI0 / ML);
      row_o  <= RW'(PI0 % ML);
      g_bank <= BW'(G0 / ML);
      g_row  <= RW'(G0 % ML);
    end else if (restart) begin
      bank_o <= BW'(PI0 / ML);
      row_o  <= RW'(PI0 % ML);
      g_bank <= BW'(G0 / ML);
      g_row  <= RW'(G0 % ML);
    end else if (advance) begin
      {bank_o, row_o} <= add_mod(bank_o, row_o, g_bank, g_row);
      {g_bank, g_row} <= add_mod(g_bank, g_row, BW'(D / ML), RW'(D % ML));
    end
  end
endmodule
