// Parallel LTE turbo decoder with compressed next-iteration-initialisation
// (NII) metrics.
//
// A frame of N soft bits (N = 6144) is decoded by P = 8 sliding-window
// max-log-MAP SISO decoders running in lockstep, each on its own segment of
// M = N/P trellis steps. One set of SISO decoders serves both constituent
// codes in turn: phase 0 decodes the first code in natural order, phase 1
// the second code in QPP-interleaved order; an iteration is one of each.
//
// Memories (P banks of M words each, bank j holding addresses j*M..j*M+M-1):
//   sys, par1, par2  channel LLRs, written while the frame is loaded
//   ext              extrinsic LLRs; read as a-priori input and overwritten
//                    in place with the new extrinsic values
//   dec              hard decisions, written in phase 1
// In phase 0 decoder j reads and writes bank j at row t. In phase 1 its QPP
// address generator gives pi(j*M + t) as (bank, row); the row is the same
// for all decoders and the banks differ, so the crossbars in the memories
// serve all eight without collision. The extrinsic result is written back to
// the address it was read from, which performs the deinterleaving.
// Parity 2 is stored in the order of the interleaved sequence and read at
// (j, t). Between iterations each decoder keeps, per phase, compressed
// backward metrics of every window boundary (its NII memory) and the forward
// metrics at its segment end; both seed the next iteration.
//
// Interface: in_valid/in_ready load N triples (systematic, parity 1, parity 2
// in interleaved order) in natural order. After decoding, out_valid streams N
// decision bits in natural order, out_last on the last; iters and early_stop
// describe the frame. busy is high from the end of loading to the end of
// read-out. Half-iteration time: (M/W)*(2W+1) + 3 cycles.
module turbo_decoder
  import turbo_pkg::*;
#(
  parameter int N        = 6144,
  parameter int P        = 8,
  parameter int W        = 32,
  parameter int MAX_ITER = 8,
  parameter int F1       = 263,
  parameter int F2       = 480,
  localparam int M   = N / P,
  localparam int BW  = (P > 1) ? $clog2(P) : 1,
  localparam int RW  = (M > 1) ? $clog2(M) : 1,
  localparam int TW  = BW + RW,
  localparam int ITW = $clog2(MAX_ITER + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  llr_t           in_sys,
  input  llr_t           in_par1,
  input  llr_t           in_par2,
  output logic           out_valid,
  output logic           out_bit,
  output logic           out_last,
  output logic           busy,
  output logic [ITW-1:0] iters,
  output logic           early_stop
);
  // controller
  logic          load_we, siso_start, phase, new_frame, first_half, dec_change;
  logic [BW-1:0] load_bank, out_bank;
  logic [RW-1:0] load_row, out_row;
  logic          out_rd_en;

  // per-decoder signals
  logic [P-1:0]           s_rd_en, s_done, s_in_valid, s_ext_valid;
  logic [P-1:0][RW-1:0]   s_rd_t;
  logic [P-1:0][BW-1:0]   q_bank;
  logic [P-1:0][RW-1:0]   q_row;
  logic [P-1:0][BW-1:0]   a_bank;                 // sys / ext read bank
  logic [P-1:0][RW-1:0]   a_row;                  // sys / ext read row
  logic [P-1:0][TW-1:0]   s_in_tag, s_ext_tag;
  ext_t [P-1:0]           s_ext_val;
  app_t [P-1:0]           s_ext_app;
  sm_vec_t                s_alpha_end [P];
  logic [P-1:0]           s_alpha_end_valid;
  logic [P-1:0]           s_nii_prev_wr, s_nii_prev_phase;
  nii_t [P-1:0]           s_nii_prev_data;

  // memory ports
  logic [P-1:0]           sys_rd_en, par_rd_en, ext_rd_en, dec_rd_en;
  logic [P-1:0][BW-1:0]   dec_rd_bank;
  logic [P-1:0][RW-1:0]   dec_rd_row;
  logic [P-1:0][LLR_W-1:0] sys_q, par1_q, par2_q;
  logic [P-1:0][EXT_W-1:0] ext_q;
  logic [P-1:0][0:0]      dec_q;
  logic [P-1:0]           ld_we;
  logic [P-1:0][BW-1:0]   ld_bank;
  logic [P-1:0][RW-1:0]   ld_row;
  logic [P-1:0][LLR_W-1:0] ld_sys, ld_par1, ld_par2, unused_old_s, unused_old_1, unused_old_2;
  logic [P-1:0][BW-1:0]   own_bank;
  logic [P-1:0][EXT_W-1:0] ext_old;
  logic [P-1:0]           dec_we;
  logic [P-1:0][0:0]      dec_new, dec_old;
  logic [P-1:0][EXT_W-1:0] ext_wdata;
  logic [P-1:0][BW-1:0]   ext_wbank;
  logic [P-1:0][RW-1:0]   ext_wrow;

  turbo_controller #(.N(N), .P(P), .MAX_ITER(MAX_ITER)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready, .load_we, .load_bank, .load_row,
    .siso_start, .phase, .new_frame, .first_half,
    .siso_done (&s_done), .dec_change,
    .out_rd_en, .out_bank, .out_row, .out_valid, .out_last,
    .busy, .iters_o (iters), .early_stop_o (early_stop)
  );

  for (genvar j = 0; j < P; j++) begin : g_dec
    logic [TW-1:0] tag_q;
    logic          vld_q;

    qpp_interleaver #(.N(N), .P(P), .F1(F1), .F2(F2), .START(j * M)) u_qpp (
      .clk, .rst_n,
      .restart (siso_start),
      .advance (s_rd_en[j] && phase),
      .bank_o  (q_bank[j]),
      .row_o   (q_row[j])
    );

    assign own_bank[j] = BW'(j);
    assign a_bank[j]   = phase ? q_bank[j] : own_bank[j];
    assign a_row[j]    = phase ? q_row[j]  : s_rd_t[j];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vld_q <= 1'b0;
        tag_q <= '0;
      end else begin
        vld_q <= s_rd_en[j];
        tag_q <= {a_bank[j], a_row[j]};
      end
    end
    assign s_in_valid[j] = vld_q;
    assign s_in_tag[j]   = tag_q;

    siso_decoder #(
      .SEG_LEN (M), .WIN (W), .TAG_W (TW),
      .FIRST_SEG (j == 0), .LAST_SEG (j == P - 1)
    ) u_siso (
      .clk, .rst_n,
      .start     (siso_start),
      .phase     (phase),
      .new_frame (new_frame),
      .busy      (),
      .done      (s_done[j]),
      .rd_en     (s_rd_en[j]),
      .rd_t      (s_rd_t[j]),
      .in_valid  (s_in_valid[j]),
      .in_ls     (llr_t'(sys_q[j])),
      .in_la     (first_half ? ext_t'(0) : ext_t'(ext_q[j])),
      .in_lp     (phase ? llr_t'(par2_q[j]) : llr_t'(par1_q[j])),
      .in_tag    (s_in_tag[j]),
      .ext_valid (s_ext_valid[j]),
      .ext_val   (s_ext_val[j]),
      .ext_app   (s_ext_app[j]),
      .ext_tag   (s_ext_tag[j]),
      .alpha_init_i       ((j == 0) ? s_alpha_end[0] : s_alpha_end[(j == 0) ? 0 : j - 1]),
      .alpha_init_valid_i ((j == 0) ? 1'b0 : s_alpha_end_valid[(j == 0) ? 0 : j - 1]),
      .alpha_end_o        (s_alpha_end[j]),
      .alpha_end_valid_o  (s_alpha_end_valid[j]),
      .nii_prev_wr    (s_nii_prev_wr[j]),
      .nii_prev_phase (s_nii_prev_phase[j]),
      .nii_prev_data  (s_nii_prev_data[j]),
      .nii_next_wr    ((j == P - 1) ? 1'b0 : s_nii_prev_wr[(j == P - 1) ? j : j + 1]),
      .nii_next_phase ((j == P - 1) ? 1'b0 : s_nii_prev_phase[(j == P - 1) ? j : j + 1]),
      .nii_next_data  ((j == P - 1) ? nii_t'(0) : s_nii_prev_data[(j == P - 1) ? j : j + 1]),
      .ev_nii_store (),
      .ev_nii_load  (),
      .ev_nii_clip  ()
    );

    // memory port j
    assign sys_rd_en[j]  = s_rd_en[j];
    assign ext_rd_en[j]  = s_rd_en[j] && !first_half;
    assign par_rd_en[j]  = s_rd_en[j];
    assign ld_we[j]      = (j == 0) ? load_we : 1'b0;
    assign ld_bank[j]    = load_bank;
    assign ld_row[j]     = load_row;
    assign ld_sys[j]     = in_sys;
    assign ld_par1[j]    = in_par1;
    assign ld_par2[j]    = in_par2;
    assign ext_wbank[j]  = s_ext_tag[j][TW-1:RW];
    assign ext_wrow[j]   = s_ext_tag[j][RW-1:0];
    assign ext_wdata[j]  = s_ext_val[j];
    assign dec_we[j]     = s_ext_valid[j] && phase;
    assign dec_new[j]    = (s_ext_app[j] > 0);
    assign dec_rd_en[j]  = (j == 0) ? out_rd_en : 1'b0;
    assign dec_rd_bank[j] = out_bank;
    assign dec_rd_row[j]  = out_row;
  end

  banked_llr_memory #(.P(P), .M(M), .DW(LLR_W)) u_sys_mem (
    .clk, .rst_n,
    .rd_en (sys_rd_en), .rd_bank (a_bank), .rd_row (a_row), .rd_data (sys_q),
    .wr_en (ld_we), .wr_bank (ld_bank), .wr_row (ld_row), .wr_data (ld_sys), .wr_old (unused_old_s)
  );

  banked_llr_memory #(.P(P), .M(M), .DW(LLR_W)) u_par1_mem (
    .clk, .rst_n,
    .rd_en (par_rd_en & {P{!phase}}), .rd_bank (own_bank), .rd_row (s_rd_t), .rd_data (par1_q),
    .wr_en (ld_we), .wr_bank (ld_bank), .wr_row (ld_row), .wr_data (ld_par1), .wr_old (unused_old_1)
  );

  banked_llr_memory #(.P(P), .M(M), .DW(LLR_W)) u_par2_mem (
    .clk, .rst_n,
    .rd_en (par_rd_en & {P{phase}}), .rd_bank (own_bank), .rd_row (s_rd_t), .rd_data (par2_q),
    .wr_en (ld_we), .wr_bank (ld_bank), .wr_row (ld_row), .wr_data (ld_par2), .wr_old (unused_old_2)
  );

  banked_llr_memory #(.P(P), .M(M), .DW(EXT_W)) u_ext_mem (
    .clk, .rst_n,
    .rd_en (ext_rd_en), .rd_bank (a_bank), .rd_row (a_row), .rd_data (ext_q),
    .wr_en (s_ext_valid), .wr_bank (ext_wbank), .wr_row (ext_wrow), .wr_data (ext_wdata),
    .wr_old (ext_old)
  );

  banked_llr_memory #(.P(P), .M(M), .DW(1)) u_dec_mem (
    .clk, .rst_n,
    .rd_en (dec_rd_en), .rd_bank (dec_rd_bank), .rd_row (dec_rd_row), .rd_data (dec_q),
    .wr_en (dec_we), .wr_bank (ext_wbank), .wr_row (ext_wrow), .wr_data (dec_new),
    .wr_old (dec_old)
  );

  always_comb begin
    dec_change = 1'b0;
    for (int j = 0; j < P; j++)
      if (dec_we[j] && dec_old[j] != dec_new[j]) dec_change = 1'b1;
  end

  assign out_bit = dec_q[0][0];

  // The decoders run in lockstep.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (s_rd_en == '0) || (s_rd_en == '1))
    else $error("turbo_decoder: SISO decoders out of step");
endmodule
