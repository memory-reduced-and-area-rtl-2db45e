// Sliding-window max-log-MAP SISO decoder with NII metric compression.
//
// Decodes one segment of SEG_LEN trellis steps of a constituent code, split
// into windows of WIN steps (w = 32). For each window x in turn:
//   forward  (WIN+1 cycles): issues WIN reads (rd_en, rd_t = local step);
//            each answer (in_valid, one cycle later) gives the branch metrics
//            of the step; the forward recursion advances and alpha_t and the
//            step's inputs are kept in the window buffer. The forward metrics
//            run on across window borders.
//   backward (WIN cycles): starts from the backward metrics of the window's
//            end boundary, rebuilt from the NII memory, and walks the window
//            in reverse, producing one extrinsic LLR per cycle (ext_valid,
//            ext_val, the a-posteriori LLR ext_app = Ls + La + Le, and the
//            tag given with the read, i.e. where the result belongs).
//            The backward metrics reached at the window's start boundary are
//            compressed (range + IMAX + IMIN) and stored as the start of the
//            window before it in the next half-iteration of the same phase.
// A half-iteration therefore takes SEG_LEN/WIN * (2*WIN + 1) cycles; 'done'
// pulses one cycle after the last extrinsic value has been presented.
//
// Boundaries between segments (parallel decoders): the boundary result of
// window 0 goes to the previous segment's decoder (nii_prev_*), which stores
// it for its last window. As the decoders run in lockstep, that word arrives
// during the previous decoder's first window, so its last window starts from
// the neighbour's result of the same half-iteration (once the phase has run
// once in the frame); the forward metrics at the end of the segment are
// kept per phase (alpha_end_o) as the start of the next segment's decoder.
// The first segment starts in state 0; the last segment's last window starts
// from equal metrics (no trellis termination is processed). In the first
// half-iteration of each phase of a frame (new_frame at start clears the
// stored values) all stored starting points are equal metrics.
// Sharing the stored metrics between iterations follows the document; the
// exact schedule (no overlap of forward and backward passes) is this
// design's choice.
module siso_decoder
  import turbo_pkg::*;
#(
  parameter int SEG_LEN   = 768,
  parameter int WIN       = 32,
  parameter int TAG_W     = 13,
  parameter bit FIRST_SEG = 1'b1,
  parameter bit LAST_SEG  = 1'b1,
  localparam int NWIN = SEG_LEN / WIN,
  localparam int T_W  = (SEG_LEN > 1) ? $clog2(SEG_LEN) : 1,
  localparam int X_W  = (NWIN > 1) ? $clog2(NWIN) : 1,
  localparam int C_W  = (WIN > 1) ? $clog2(WIN) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // control
  input  logic             start,
  input  logic             phase,         // 0: in-order, 1: interleaved; hold stable
  input  logic             new_frame,     // with start: forget stored metrics
  output logic             busy,
  output logic             done,
  // input stream
  output logic             rd_en,
  output logic [T_W-1:0]   rd_t,
  input  logic             in_valid,
  input  llr_t             in_ls,
  input  ext_t             in_la,
  input  llr_t             in_lp,
  input  logic [TAG_W-1:0] in_tag,
  // output stream
  output logic             ext_valid,
  output ext_t             ext_val,
  output app_t             ext_app,
  output logic [TAG_W-1:0] ext_tag,
  // forward metrics across segment boundaries
  input  sm_vec_t          alpha_init_i,
  input  logic             alpha_init_valid_i,
  output sm_vec_t          alpha_end_o,
  output logic             alpha_end_valid_o,
  // backward metrics across segment boundaries (compressed)
  output logic             nii_prev_wr,
  output logic             nii_prev_phase,
  output nii_t             nii_prev_data,
  input  logic             nii_next_wr,
  input  logic             nii_next_phase,
  input  nii_t             nii_next_data,
  // events (observation)
  output logic             ev_nii_store,
  output logic             ev_nii_load,
  output logic             ev_nii_clip
);
  typedef enum logic [1:0] {S_IDLE, S_FWD, S_BWD} state_e;

  typedef struct packed {
    sm_vec_t          alpha;
    llr_t             ls;
    ext_t             la;
    llr_t             lp;
    logic [TAG_W-1:0] tag;
  } wentry_t;

  state_e          state;
  logic            phase_q;
  logic [X_W-1:0]  x;
  logic [C_W:0]    iss;
  logic [C_W-1:0]  rcv;
  logic [C_W-1:0]  c;
  sm_vec_t         alpha, alpha_next, beta, beta_next, beta_rec, beta_init;
  sm_vec_t         alpha_end [2];
  logic [1:0]      alpha_end_valid;
  logic [1:0]      nii_valid;
  bm_vec_t         gamma_f, gamma_b;
  wentry_t         wr_entry, rd_entry;
  ext_t            ext;
  nii_t            nii_word, nii_rd;
  logic            nii_clipped;
  logic            nii_wr_en;
  logic            last_window;
  logic            use_stored_beta;
  sm_vec_t         start_metrics;

  // ---------------------------------------------------------------- forward
  branch_metric_unit u_bmu_f (.ls_i(in_ls), .la_i(in_la), .lp_i(in_lp), .gamma_o(gamma_f));
  alpha_unit         u_alpha (.alpha_i(alpha), .gamma_i(gamma_f), .alpha_o(alpha_next));

  assign wr_entry = '{alpha: alpha, ls: in_ls, la: in_la, lp: in_lp, tag: in_tag};

  window_buffer #(.DEPTH(WIN), .DATA_W($bits(wentry_t))) u_wbuf (
    .clk     (clk),
    .wr_en   (state == S_FWD && in_valid),
    .wr_addr (rcv),
    .wr_data (wr_entry),
    .rd_addr (C_W'(WIN - 1) - c),
    .rd_data (rd_entry)
  );

  // --------------------------------------------------------------- backward
  branch_metric_unit u_bmu_b (.ls_i(rd_entry.ls), .la_i(rd_entry.la), .lp_i(rd_entry.lp), .gamma_o(gamma_b));
  beta_unit          u_beta  (.beta_i(beta), .gamma_i(gamma_b), .beta_o(beta_next));
  llr_unit           u_llr   (.alpha_i(rd_entry.alpha), .beta_i(beta), .lp_i(rd_entry.lp), .ext_o(ext));

  // ------------------------------------------------------------------- NII
  nii_compressor u_comp (.metrics_i(beta_next), .nii_o(nii_word), .clipped_o(nii_clipped));

  nii_memory #(.NWIN(NWIN)) u_nii_mem (
    .clk          (clk),
    .wr_en        (nii_wr_en),
    .wr_phase     (phase_q),
    .wr_addr      (X_W'(x - 1'b1)),
    .wr_data      (nii_word),
    .nbr_wr_en    (nii_next_wr),
    .nbr_wr_phase (nii_next_phase),
    .nbr_wr_addr  (X_W'(NWIN - 1)),
    .nbr_wr_data  (nii_next_data),
    .rd_phase     (phase_q),
    .rd_addr      (x),
    .rd_data      (nii_rd)
  );

  nii_recovery u_rec (.nii_i(nii_rd), .metrics_o(beta_rec));

  always_comb begin
    last_window     = (x == X_W'(NWIN - 1));
    use_stored_beta = nii_valid[phase_q] && !(LAST_SEG && last_window);
    beta_init       = use_stored_beta ? beta_rec : '0;
    nii_wr_en       = (state == S_BWD) && (c == C_W'(WIN - 1)) && (x != '0);
    nii_prev_wr     = (state == S_BWD) && (c == C_W'(WIN - 1)) && (x == '0) && !FIRST_SEG;
    nii_prev_phase  = phase_q;
    nii_prev_data   = nii_word;
    ev_nii_store    = nii_wr_en || nii_prev_wr;
    ev_nii_clip     = ev_nii_store && nii_clipped;
    ev_nii_load     = (state == S_FWD) && in_valid && (rcv == C_W'(WIN - 1)) && use_stored_beta;
    for (int s = 0; s < NUM_STATES; s++)
      start_metrics[s] = (s == 0) ? sm_t'(0) : sm_t'(SM_NEG_INF);
  end

  // ------------------------------------------------------------- interface
  assign busy              = (state != S_IDLE);
  assign rd_en             = (state == S_FWD) && (iss != (C_W+1)'(WIN));
  assign rd_t              = T_W'(x) * T_W'(WIN) + T_W'(iss);
  assign alpha_end_o       = alpha_end[phase];
  assign alpha_end_valid_o = alpha_end_valid[phase];

  // ------------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= S_IDLE;
      phase_q         <= 1'b0;
      x               <= '0;
      iss             <= '0;
      rcv             <= '0;
      c               <= '0;
      alpha           <= '0;
      beta            <= '0;
      alpha_end       <= '{default: '0};
      alpha_end_valid <= '0;
      nii_valid       <= '0;
      done            <= 1'b0;
      ext_valid       <= 1'b0;
      ext_val         <= '0;
      ext_app         <= '0;
      ext_tag         <= '0;
    end else begin
      done      <= 1'b0;
      ext_valid <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start) begin
            phase_q <= phase;
            x       <= '0;
            iss     <= '0;
            rcv     <= '0;
            state   <= S_FWD;
            if (new_frame) begin
              nii_valid       <= '0;
              alpha_end_valid <= '0;
            end
            if (FIRST_SEG)                              alpha <= start_metrics;
            else if (alpha_init_valid_i && !new_frame)  alpha <= alpha_init_i;
            else                                        alpha <= '0;
          end
        end
        S_FWD: begin
          if (rd_en) iss <= iss + 1'b1;
          if (in_valid) begin
            alpha <= alpha_next;
            rcv   <= rcv + 1'b1;
            if (rcv == C_W'(WIN - 1)) begin
              state <= S_BWD;
              c     <= '0;
              beta  <= beta_init;
              if (last_window) begin
                alpha_end[phase_q]       <= alpha_next;
                alpha_end_valid[phase_q] <= 1'b1;
              end
            end
          end
        end
        S_BWD: begin
          beta      <= beta_next;
          ext_valid <= 1'b1;
          ext_val   <= ext;
          ext_app   <= app_t'(rd_entry.ls) + app_t'(rd_entry.la) + app_t'(ext);
          ext_tag   <= rd_entry.tag;
          c         <= c + 1'b1;
          if (c == C_W'(WIN - 1)) begin
            if (last_window) begin
              state              <= S_IDLE;
              done               <= 1'b1;
              nii_valid[phase_q] <= 1'b1;
            end else begin
              x     <= x + 1'b1;
              iss   <= '0;
              rcv   <= '0;
              state <= S_FWD;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_input_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> state == S_FWD)
    else $error("siso_decoder: input outside the forward pass");
endmodule
