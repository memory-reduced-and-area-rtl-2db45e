// Checks the SISO decoder bit-exactly against a reference model of the
// sliding-window max-log-MAP schedule with NII compression, for a middle
// segment (forward start and last-window backward start come from the
// neighbours) of 64 steps in windows of 16. Four half-iterations: phase 0
// and phase 1 of a new frame (stored metrics unused), then both phases
// again (backward starts rebuilt from the NII memory, forward start taken
// from the neighbour). Checked: every extrinsic and a-posteriori value and
// its tag, the compressed word handed to the previous segment, the stored
// segment-end forward metrics, and the half-iteration time
// (SEG_LEN/WIN)*(2*WIN+1)+1 cycles from start to done.
module tb_siso_decoder;
  import turbo_pkg::*;
  import tb_ref_pkg::*;
  localparam int L = 64, WN = 16, NW = L / WN;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 1'b1, start = 1'b0, phase = 1'b0, new_frame = 1'b0;
  initial #1 rst_n = 1'b0;     // reset edge before the first clock edge
  logic busy, done, rd_en, in_valid = 1'b0, ext_valid;
  logic [5:0] rd_t;
  llr_t in_ls = '0, in_lp = '0;
  ext_t in_la = '0, ext_val;
  app_t ext_app;
  logic [7:0] in_tag = '0, ext_tag;
  sm_vec_t alpha_init, alpha_end;
  logic alpha_init_valid, alpha_end_valid;
  logic nii_prev_wr, nii_prev_phase;
  nii_t nii_prev_data, nii_next_data;
  logic ev_nii_store, ev_nii_load, ev_nii_clip;

  siso_decoder #(.SEG_LEN(L), .WIN(WN), .TAG_W(8), .FIRST_SEG(1'b0), .LAST_SEG(1'b0)) dut (
    .clk, .rst_n, .start, .phase, .new_frame, .busy, .done,
    .rd_en, .rd_t, .in_valid, .in_ls, .in_la, .in_lp, .in_tag,
    .ext_valid, .ext_val, .ext_app, .ext_tag,
    .alpha_init_i (alpha_init), .alpha_init_valid_i (alpha_init_valid),
    .alpha_end_o (alpha_end), .alpha_end_valid_o (alpha_end_valid),
    .nii_prev_wr, .nii_prev_phase, .nii_prev_data,
    .nii_next_wr (nii_prev_wr), .nii_next_phase (nii_prev_phase), .nii_next_data,
    .ev_nii_store, .ev_nii_load, .ev_nii_clip
  );

  int ls [L], la [L], lp [L];

  // input memory model: one cycle read latency
  always @(posedge clk) begin
    in_valid <= rd_en;
    in_ls    <= llr_t'(ls[rd_t]);
    in_la    <= ext_t'(la[rd_t]);
    in_lp    <= llr_t'(lp[rd_t]);
    in_tag   <= 8'(rd_t) ^ 8'hA5;
  end

  // reference state
  int    r_delta [2][NW], r_imax [2][NW], r_imin [2][NW];
  bit    r_valid [2];
  mvec_t r_aend;
  int    exp_ext [L], exp_app [L], exp_tag [L];
  int    exp_prev [3];
  int    n_out, n_prev_seen;

  task automatic reference(input int ph, input bit nf, input mvec_t a0);
    mvec_t a, b, al [L];
    int d, imx, imn;
    bit cl;
    if (nf) begin r_valid[0] = 0; r_valid[1] = 0; end
    a = a0;
    n_out = 0;
    // the neighbour's word for the last window arrives during window 0
    r_delta[ph][NW-1] = int'(nii_next_data.delta);
    r_imax[ph][NW-1]  = int'(nii_next_data.imax);
    r_imin[ph][NW-1]  = int'(nii_next_data.imin);
    for (int x = 0; x < NW; x++) begin
      for (int c = 0; c < WN; c++) begin
        al[x*WN+c] = a;
        a = ref_alpha(a, ls[x*WN+c], la[x*WN+c], lp[x*WN+c]);
      end
      if (x == NW - 1) r_aend = a;
      if (r_valid[ph]) b = ref_recover(r_delta[ph][x], r_imax[ph][x], r_imin[ph][x]);
      else for (int s = 0; s < 8; s++) b[s] = 0;
      for (int t = x*WN + WN - 1; t >= x*WN; t--) begin
        exp_ext[n_out] = ref_ext(al[t], b, lp[t]);
        exp_app[n_out] = ls[t] + la[t] + exp_ext[n_out];
        exp_tag[n_out] = t ^ 'hA5;
        n_out++;
        b = ref_beta(b, ls[t], la[t], lp[t]);
      end
      ref_compress(b, d, imx, imn, cl);
      if (x > 0) begin
        r_delta[ph][x-1] = d; r_imax[ph][x-1] = imx; r_imin[ph][x-1] = imn;
      end else begin
        exp_prev[0] = d; exp_prev[1] = imx; exp_prev[2] = imn;
      end
    end
    r_valid[ph] = 1;
  endtask

  int k_out;
  always @(posedge clk) begin
    if (rst_n && ext_valid) begin
      checks++;
      if (k_out >= L || int'(ext_val) != exp_ext[k_out] || int'(ext_app) != exp_app[k_out]
          || int'(ext_tag) != exp_tag[k_out]) begin
        failures++;
        if (failures < 6) $display("FAIL: output %0d got ext=%0d app=%0d tag=%0d expected %0d %0d %0d",
          k_out, ext_val, ext_app, ext_tag, exp_ext[k_out], exp_app[k_out], exp_tag[k_out]);
      end
      k_out++;
    end
    if (rst_n && nii_prev_wr) begin
      n_prev_seen++;
      checks++;
      if (int'(nii_prev_data.delta) != exp_prev[0] || int'(nii_prev_data.imax) != exp_prev[1]
          || int'(nii_prev_data.imin) != exp_prev[2] || nii_prev_phase != phase) begin
        failures++;
        $display("FAIL: NII word to previous segment");
      end
    end
  end

  initial begin
    mvec_t a0;
    int t0, t1;
    k_out = 0; n_prev_seen = 0;
    for (int s = 0; s < 8; s++) begin
      a0[s] = int'($urandom_range(0, 80)) - 40;
      alpha_init[s] = sm_t'(a0[s]);
    end
    alpha_init_valid = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int h = 0; h < 4; h++) begin
      mvec_t a_start;
      for (int t = 0; t < L; t++) begin
        ls[t] = int'($urandom_range(0, 40)) - 20;
        lp[t] = int'($urandom_range(0, 40)) - 20;
        la[t] = (h == 0) ? 0 : int'($urandom_range(0, 120)) - 60;
      end
      nii_next_data = nii_t'({8'($urandom), 3'($urandom), 3'($urandom)});
      if (h < 2) for (int s = 0; s < 8; s++) a_start[s] = (h == 0) ? 0 : 0;
      else       a_start = a0;
      if (h == 1) alpha_init_valid = 1'b0;   // neighbour has nothing for phase 1 yet
      if (h >= 2) alpha_init_valid = 1'b1;
      reference(h % 2, h == 0, a_start);
      k_out = 0;
      @(negedge clk);
      phase = 1'(h % 2);
      new_frame = (h == 0);
      start = 1'b1;
      t0 = $time;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      t1 = $time;
      checks++;
      if ((t1 - t0) / 10 != NW * (2 * WN + 1) + 1) begin
        failures++;
        $display("FAIL: half-iteration took %0d cycles", (t1 - t0) / 10);
      end
      @(negedge clk);
      checks++;
      if (k_out != L) begin failures++; $display("FAIL: %0d outputs", k_out); end
      checks++;
      if (!alpha_end_valid) failures++;
      for (int s = 0; s < 8; s++) begin
        checks++;
        if (int'(alpha_end[s]) != r_aend[s]) begin failures++; $display("FAIL: alpha_end[%0d]", s); end
      end
    end
    checks++;
    if (n_prev_seen != 4) begin failures++; $display("FAIL: %0d NII hand-overs", n_prev_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
