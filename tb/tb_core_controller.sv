// tb_core_controller: self-checking test of core_controller (HOG stage + Sparse FIND stage).
//
// Random but self-consistent blocks (histogram, its h_i > mean selection, and the encoded
// normalisation coefficients) of a 12 x 19 block grid are pushed in column-major order as
// fast as blk_in_ready allows, after random SVM coefficients have been loaded. A reference
// model in real arithmetic computes, for each of the 8 x 5 windows, the HOG score
// (bias + sum w * h_i/sqrt(S)) and the Sparse FIND score (bias + sum w * h_i*h_j/S over the
// selected pairs). alpha is set so that most windows are rejected, the detection threshold to
// the median Sparse FIND score of the kept windows. Checked: every window passes the HOG stage
// once with the right rejection decision, every kept window above the threshold is detected
// with its score, no other window is, and frame_done comes. Windows within the fixed-point
// tolerance of a threshold are not judged. The stop signal, the wait of the HOG stage for the
// Sparse FIND stage, rejection, skipped and worked block pairs must all occur.
module tb_core_controller;
  import sfind_pkg::*;
  localparam int WB = 12, HB = 19, NWX = WB - 4, NWY = HB - 14;
  localparam real Q28 = 268435456.0;
  localparam real TOL = 0.02;   // score tolerance (real units)

  logic clk = 0, rst_n = 0, start = 0;
  coord_t img_w, img_h;
  logic blk_in_valid = 0; block_rec_t blk_in; logic blk_in_ready;
  logic coef_wr_en = 0, coef_wr_sel; logic [6:0] coef_wr_pos; logic [9:0] coef_wr_idx; coef_t coef_wr_data;
  score_t hog_bias, hog_alpha, sf_bias, sf_threshold;
  logic [1:0] det_valid; coord_t det_wx [2], det_wy [2]; score_t det_score [2];
  logic frame_busy, frame_done;
  logic ev_stop, ev_buf_wait, ev_hog_window, ev_hog_reject, ev_sf_pair, ev_sf_skip;
  logic [5:0] sf_pair_cycles;

  int checks = 0, failures = 0;
  int n_stop = 0, n_wait = 0, n_win = 0, n_rej = 0, n_pair = 0, n_skip = 0, n_det = 0;
  int hist [WB][HB][M_HIST];
  bit sel [WB][HB][M_HIST];
  real sumsq [WB][HB];
  shortint wh [WIN_BLKS][M_HIST];
  shortint ws [WIN_BLKS][N_PAIRS];
  real hog_ref [NWX][NWY], sf_ref [NWX][NWY];
  bit  detected [NWX][NWY];
  real alpha_r, thr_r, hb_r, sb_r;

  core_controller #(.MAX_BROWS(HB)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    n_stop += int'(ev_stop && frame_busy);
    n_wait += int'(ev_buf_wait);
    n_pair += int'(ev_sf_pair);
    n_skip += int'(ev_sf_skip);
  end

  // HOG stage decisions, observed inside the HOG classifier's result port
  always @(posedge clk) if (rst_n && dut.hres_valid[0]) begin
    int x, y; real s;
    x = int'(dut.hres_wx[0]); y = int'(dut.hres_wy[0]);
    n_win++;
    if (!dut.hres_pass[0]) n_rej++;
    s = real'(dut.hres_score[0]) / Q28;
    checks++;
    if (s - hog_ref[x][y] > TOL || hog_ref[x][y] - s > TOL) begin
      failures++; $display("HOG score win %0d,%0d %f exp %f", x, y, s, hog_ref[x][y]);
    end
  end

  always @(posedge clk) if (rst_n) for (int g = 0; g < 2; g++) if (det_valid[g]) begin
    int x, y; real s;
    x = int'(det_wx[g]); y = int'(det_wy[g]);
    s = real'(det_score[g]) / Q28;
    n_det++;
    checks++;
    if (detected[x][y]) begin failures++; $display("window %0d,%0d detected twice", x, y); end
    detected[x][y] = 1;
    if (s - sf_ref[x][y] > TOL || sf_ref[x][y] - s > TOL) begin
      failures++; $display("SF score win %0d,%0d %f exp %f", x, y, s, sf_ref[x][y]);
    end
  end

  function automatic real wscore_hog(int x, int y);
    real s = hb_r;
    for (int c = 0; c < 5; c++) for (int j = 0; j < 15; j++) for (int i = 0; i < M_HIST; i++)
      s += real'(wh[c*15+j][i]) / 4096.0 * real'(hist[x+c][y+j][i]) / $sqrt(sumsq[x+c][y+j]);
    return s;
  endfunction

  function automatic real wscore_sf(int x, int y);
    real s = sb_r;
    for (int c = 0; c < 5; c++) for (int j = 0; j < 15; j++) for (int k = 0; k < N_PAIRS; k++) begin
      int bx = x + c, by = y + j;
      int i = int'(pair_i(k)), jj = int'(pair_j(k));
      if (sel[bx][by][i] && sel[bx][by][jj])
        s += real'(ws[c*15+j][k]) / 4096.0 * real'(hist[bx][by][i]) * real'(hist[bx][by][jj]) / sumsq[bx][by];
    end
    return s;
  endfunction

  task automatic sort_real(ref real v [$]);
    v.sort();
  endtask

  initial begin
    real hv [$], sv [$];
    hb_r = 0.1; sb_r = -0.2;
    hog_bias = score_t'(longint'(hb_r * Q28));
    sf_bias  = score_t'(longint'(sb_r * Q28));
    for (int x = 0; x < WB; x++) for (int y = 0; y < HB; y++) begin
      real mean;
      sumsq[x][y] = 0.0; mean = 0.0;
      for (int i = 0; i < M_HIST; i++) begin
        // a few empty-ish blocks and many dense ones make the pair work vary
        if ((x + y) % 5 == 0)              hist[x][y][i] = $urandom_range(0, 30);
        else if ($urandom_range(0, 3) == 0) hist[x][y][i] = 0;
        else                               hist[x][y][i] = $urandom_range(6000, 9000);
        sumsq[x][y] += real'(hist[x][y][i]) ** 2;
        mean += real'(hist[x][y][i]) / real'(M_HIST);
      end
      if (sumsq[x][y] == 0.0) begin hist[x][y][0] = 1; sumsq[x][y] = 1.0; mean = 1.0 / 32.0; end
      for (int i = 0; i < M_HIST; i++) sel[x][y][i] = real'(hist[x][y][i]) > mean;
    end
    for (int p = 0; p < WIN_BLKS; p++) begin
      for (int i = 0; i < M_HIST; i++) wh[p][i] = shortint'($urandom_range(0, 8191)) - 16'sd4096;
      for (int k = 0; k < N_PAIRS; k++) ws[p][k] = shortint'($urandom_range(0, 8191)) - 16'sd4096;
    end
    for (int x = 0; x < NWX; x++) for (int y = 0; y < NWY; y++) begin
      hog_ref[x][y] = wscore_hog(x, y);
      sf_ref[x][y]  = wscore_sf(x, y);
      hv.push_back(hog_ref[x][y]);
    end
    sort_real(hv);
    alpha_r = (hv[hv.size() * 7 / 10] + hv[hv.size() * 7 / 10 + 1]) / 2.0;   // keep about 30 %
    for (int x = 0; x < NWX; x++) for (int y = 0; y < NWY; y++)
      if (hog_ref[x][y] > alpha_r) sv.push_back(sf_ref[x][y]);
    sort_real(sv);
    thr_r = (sv.size() > 1) ? (sv[sv.size() / 2 - 1] + sv[sv.size() / 2]) / 2.0 : 0.0;
    hog_alpha    = score_t'(longint'(alpha_r * Q28));
    sf_threshold = score_t'(longint'(thr_r * Q28));

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // load the coefficients
    for (int p = 0; p < WIN_BLKS; p++) begin
      for (int i = 0; i < M_HIST; i++) begin
        coef_wr_en = 1; coef_wr_sel = 0; coef_wr_pos = 7'(p); coef_wr_idx = 10'(i); coef_wr_data = wh[p][i];
        @(posedge clk); #1;
      end
      for (int k = 0; k < N_PAIRS; k++) begin
        coef_wr_en = 1; coef_wr_sel = 1; coef_wr_pos = 7'(p); coef_wr_idx = 10'(k); coef_wr_data = ws[p][k];
        @(posedge clk); #1;
      end
    end
    coef_wr_en = 0;
    img_w = coord_t'(4 * (WB + 1)); img_h = coord_t'(4 * (HB + 1));
    start = 1; @(posedge clk); #1 start = 0;
    for (int x = 0; x < WB; x++) for (int y = 0; y < HB; y++) begin
      real s;
      int e;
      s = sumsq[x][y];
      e = 0;
      while (s / (4.0 ** e) >= 4.0) e++;
      for (int i = 0; i < M_HIST; i++) begin
        blk_in.hist[i] = BIN_W'(hist[x][y][i]);
        blk_in.sel[i]  = sel[x][y][i];
      end
      blk_in.r_mant = RM_W'(int'(131072.0 * (2.0 ** e) / $sqrt(s)));
      blk_in.a_mant = RM_W'(int'(131072.0 * (4.0 ** e) / s));
      blk_in.e  = EXP_W'(e);
      blk_in.bx = coord_t'(x);
      blk_in.by = coord_t'(y);
      blk_in_valid = 1;
      @(posedge clk);
      while (!blk_in_ready) @(posedge clk);
      #1 blk_in_valid = 0;
    end
    while (!frame_done) @(posedge clk);
    repeat (3) @(posedge clk);

    for (int x = 0; x < NWX; x++) for (int y = 0; y < NWY; y++) begin
      bit kept_r, amb;
      kept_r = hog_ref[x][y] > alpha_r;
      amb = (hog_ref[x][y] - alpha_r < TOL && alpha_r - hog_ref[x][y] < TOL) ||
            (sf_ref[x][y] - thr_r < TOL && thr_r - sf_ref[x][y] < TOL);
      if (!amb) begin
        checks++;
        if (detected[x][y] != (kept_r && sf_ref[x][y] > thr_r)) begin
          failures++; $display("window %0d,%0d detected=%0b hog %f sf %f", x, y, detected[x][y], hog_ref[x][y], sf_ref[x][y]);
        end
      end
    end
    checks++;
    if (n_win != NWX * NWY) begin failures++; $display("%0d HOG windows", n_win); end
    $display("events: stop %0d, wait %0d, rejected %0d of %0d, pairs %0d, skipped %0d, detections %0d",
             n_stop, n_wait, n_rej, n_win, n_pair, n_skip, n_det);
    checks++; if (n_stop == 0) begin failures++; $display("stop signal never raised"); end
    checks++; if (n_wait == 0) begin failures++; $display("HOG stage never waited"); end
    checks++; if (n_rej == 0)  begin failures++; $display("no window rejected"); end
    checks++; if (n_skip == 0) begin failures++; $display("no block pair skipped"); end
    checks++; if (n_pair == n_skip) begin failures++; $display("no block pair worked"); end
    checks++; if (n_det == 0)  begin failures++; $display("no detection"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
