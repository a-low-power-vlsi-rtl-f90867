// tb_sparse_find_processor_full: the end-to-end test of tb_sparse_find_processor run on one
// full HDTV frame (1920 x 1080 pixels) with the core at its default parameters (16 coefficient
// banks, no parameter override).
//
// Same image construction, reference model and checks as the small test. Because a software
// score of all 121,125 windows would take too long, about 400 randomly chosen windows are scored
// in the reference and judged (HOG score, rejection, detection and detection score); all
// windows still count toward the HOG window and block-pair totals. Every block leaving the
// common stage is also compared with the reference histogram and selection bits. Pixels are fed at one per
// clock without gaps. Required events: stop signal, rejected windows, skipped and worked block
// pairs, detections and the end of the frame; the HOG-stage wait for the Sparse FIND stage is
// counted and printed but not required here. The rejection threshold alpha is set at the 80th percentile
// of the judged windows' HOG scores, so that most windows are rejected, as in normal operation,
// and block pairs near the image border lie in no kept window and are skipped.
// The printed frame time is the clock count for one HDTV frame with a pixel offered every clock.
module tb_sparse_find_processor_full;
  import sfind_pkg::*;
  localparam int W = 1920, H = 1080, SAMPLE_WIN = 400, ALPHA_PCT = 80;
  localparam int WC = W / 4, HC = H / 4, WB = WC - 1, HB = HC - 1, NWX = WB - 4, NWY = HB - 14;
  // Loop bounds as variables, so that the simulator compiles the reference loops as loops.
  int rW = W, rH = H, rWC = WC, rHC = HC, rWB = WB, rHB = HB, rNWX = NWX, rNWY = NWY;
  localparam real Q28 = 268435456.0;
  localparam real K = 1.6467599963756174;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, start = 0;
  coord_t img_w, img_h;
  logic pix_valid = 0; pix_t pix; logic pix_ready;
  logic coef_wr_en = 0, coef_wr_sel; logic [6:0] coef_wr_pos; logic [9:0] coef_wr_idx; coef_t coef_wr_data;
  score_t hog_bias, hog_alpha, sf_bias, sf_threshold;
  logic [1:0] det_valid; coord_t det_wx [2], det_wy [2]; score_t det_score [2];
  logic frame_busy, frame_done;
  logic ev_stop, ev_buf_wait, ev_hog_window, ev_hog_reject, ev_sf_pair, ev_sf_skip;
  logic [5:0] sf_pair_cycles;

  int checks = 0, failures = 0, cyc = 0;
  int n_stop = 0, n_wait = 0, n_win = 0, n_rej = 0, n_pair = 0, n_skip = 0, n_det = 0, n_shared = 0;
  int img [W][H];
  real blk [WB][HB][M_HIST];
  bit  blk_amb [WB][HB];
  bit  sel [WB][HB][M_HIST];
  real sumsq [WB][HB];
  shortint wh [WIN_BLKS][M_HIST];
  shortint ws [WIN_BLKS][N_PAIRS];
  real hog_ref [NWX][NWY], sf_ref [NWX][NWY];
  bit  judged [NWX][NWY], detected [NWX][NWY];
  real alpha_r, thr_r, hb_r, sb_r, tol_h, tol_s, max_eh = 0.0, max_es = 0.0;

  sparse_find_processor dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  always @(posedge clk) if (rst_n) begin
    n_stop += int'(ev_stop && frame_busy);
    n_wait += int'(ev_buf_wait);
    n_pair += int'(ev_sf_pair);
    n_skip += int'(ev_sf_skip);
    n_win  += int'(ev_hog_window);
    n_rej  += int'(ev_hog_reject);
  end

  // The HOG result port of the core, for the HOG score checks.
  logic hres_v; coord_t hres_x, hres_y; score_t hres_s;
  assign hres_v = dut.u_ctrl.hres_valid[0];
  assign hres_x = dut.u_ctrl.hres_wx[0];
  assign hres_y = dut.u_ctrl.hres_wy[0];
  assign hres_s = dut.u_ctrl.hres_score[0];

  always @(posedge clk) if (rst_n && hres_v) begin
    int x, y; real s;
    x = int'(hres_x); y = int'(hres_y);
    if (judged[x][y]) begin
      s = real'(hres_s) / Q28;
      if (absr(s - hog_ref[x][y]) > max_eh) max_eh = absr(s - hog_ref[x][y]);
      checks++;
      if (absr(s - hog_ref[x][y]) > tol_h) begin
        failures++; $display("HOG score win %0d,%0d %f exp %f", x, y, s, hog_ref[x][y]);
      end
    end
  end

  // Each block leaving the common stage, checked against the reference histogram and selection.
  logic blk_v; block_rec_t blk_r;
  int n_blk_bad = 0;
  assign blk_v = dut.n_valid && dut.en;
  assign blk_r = dut.rec;

  always @(posedge clk) if (rst_n && blk_v) begin
    int bx, by; bit bad;
    bx = int'(blk_r.bx); by = int'(blk_r.by); bad = 0;
    if (bx < WB && by < HB && !blk_amb[bx][by]) begin
      for (int i = 0; i < M_HIST; i++)
        if (real'(blk_r.hist[i]) != blk[bx][by][i] || blk_r.sel[i] != sel[bx][by][i]) bad = 1;
      checks++;
      if (bad) begin
        failures++; n_blk_bad++;
        if (n_blk_bad <= 4) begin
          $display("block %0d,%0d differs:", bx, by);
          for (int i = 0; i < M_HIST; i++)
            $display("  h%0d %0d/%0b exp %f/%0b", i, blk_r.hist[i], blk_r.sel[i], blk[bx][by][i], sel[bx][by][i]);
        end
      end
    end
  end

  always @(posedge clk) if (rst_n && ev_sf_pair && sf_pair_cycles != 0) n_shared++;

  always @(posedge clk) if (rst_n) for (int g = 0; g < 2; g++) if (det_valid[g]) begin
    int x, y; real s;
    x = int'(det_wx[g]); y = int'(det_wy[g]);
    n_det++;
    checks++;
    if (x >= NWX || y >= NWY || detected[x][y]) begin failures++; $display("bad or repeated detection %0d,%0d", x, y); end
    else begin
      detected[x][y] = 1;
      if (judged[x][y]) begin
        s = real'(det_score[g]) / Q28;
        if (absr(s - sf_ref[x][y]) > max_es) max_es = absr(s - sf_ref[x][y]);
        checks++;
        if (absr(s - sf_ref[x][y]) > tol_s) begin
          failures++; $display("SF score win %0d,%0d %f exp %f", x, y, s, sf_ref[x][y]);
        end
      end
    end
  end

  // ---------------- reference model ----------------
  task automatic make_image();
    int p [W], q [H];
    p[0] = 60;
    for (int x = 1; x < rW; x++) begin
      int st = ($urandom_range(0, 1) != 0) ? 3 : 1;
      if (p[x-1] > 100) p[x] = p[x-1] - st;
      else if (p[x-1] < 30) p[x] = p[x-1] + st;
      else p[x] = p[x-1] + (($urandom_range(0, 1) != 0) ? st : -st);
    end
    q[0] = 60;
    for (int y = 1; y < rH; y++) begin
      int st = ($urandom_range(0, 1) != 0) ? 5 : 2;
      if (q[y-1] > 100) q[y] = q[y-1] - st;
      else if (q[y-1] < 30) q[y] = q[y-1] + st;
      else q[y] = q[y-1] + (($urandom_range(0, 1) != 0) ? st : -st);
    end
    for (int x = 0; x < rW; x++) for (int y = 0; y < rH; y++) img[x][y] = p[x] + q[y];
  endtask

  real cellh [WC][HC][D_BINS];
  bit  camb [WC][HC];
  task automatic reference_blocks();
    for (int cx = 0; cx < rWC; cx++) for (int cy = 0; cy < rHC; cy++) begin
      camb[cx][cy] = 0;
      for (int b = 0; b < D_BINS; b++) cellh[cx][cy][b] = 0.0;
    end
    for (int x = 0; x < rW; x++) for (int y = 0; y < rH; y++) begin
      int dx, dy, b; real a, m, r;
      dx = (x == 0) ? 0 : img[x][y] - img[x-1][y];
      dy = (y == 0) ? 0 : img[x][y] - img[x][y-1];
      if (dy < 0 || (dy == 0 && dx < 0)) begin dx = -dx; dy = -dy; end
      m = K * $sqrt(real'(dx * dx + dy * dy));
      // The core rounds the magnitude to an integer; a value close to x.5 could round either way.
      if (absr(m - $floor(m) - 0.5) < 0.1) camb[x/4][y/4] = 1;
      m = $floor(m + 0.5);
      a = $atan2(real'(dy), real'(dx)) * 180.0 / PI;
      if (a >= 180.0) a -= 180.0;
      b = int'($floor(a / 22.5));
      r = a - 22.5 * real'(b);
      if (m > 0.0 && a > 0.5 && (r < 0.5 || r > 22.0)) camb[x/4][y/4] = 1;
      cellh[x/4][y/4][b] += m;
    end
    for (int bx = 0; bx < rWB; bx++) for (int by = 0; by < rHB; by++) begin
      real mean;
      sumsq[bx][by] = 0.0; mean = 0.0;
      blk_amb[bx][by] = camb[bx][by] | camb[bx+1][by] | camb[bx][by+1] | camb[bx+1][by+1];
      for (int i = 0; i < M_HIST; i++) begin
        int q = i / D_BINS;
        blk[bx][by][i] = cellh[bx + (q % 2)][by + (q / 2)][i % D_BINS];
        sumsq[bx][by] += blk[bx][by][i] ** 2;
        mean += blk[bx][by][i] / real'(M_HIST);
      end
      for (int i = 0; i < M_HIST; i++) begin
        sel[bx][by][i] = blk[bx][by][i] > mean;
      end
    end
  endtask

  function automatic real wscore_hog(int x, int y);
    real s = hb_r;
    for (int c = 0; c < 5; c++) for (int j = 0; j < 15; j++) begin
      int bx = x + c, by = y + j;
      if (sumsq[bx][by] > 0.0)
        for (int i = 0; i < M_HIST; i++)
          s += real'(wh[c*15+j][i]) / 4096.0 * blk[bx][by][i] / $sqrt(sumsq[bx][by]);
    end
    return s;
  endfunction

  function automatic real wscore_sf(int x, int y);
    real s = sb_r;
    for (int c = 0; c < 5; c++) for (int j = 0; j < 15; j++) begin
      int bx = x + c, by = y + j;
      if (sumsq[bx][by] > 0.0)
        for (int k = 0; k < N_PAIRS; k++) begin
          int i = int'(pair_i(k)), jj = int'(pair_j(k));
          if (sel[bx][by][i] && sel[bx][by][jj])
            s += real'(ws[c*15+j][k]) / 4096.0 * blk[bx][by][i] * blk[bx][by][jj] / sumsq[bx][by];
        end
    end
    return s;
  endfunction

  function automatic bit win_amb(int x, int y);
    for (int c = 0; c < 5; c++) for (int j = 0; j < 15; j++) if (blk_amb[x+c][y+j]) return 1;
    return 0;
  endfunction

  initial begin
    int max_cycles;
    max_cycles = 40 * W * H + 200000;
    repeat (max_cycles) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real hv [$], sv [$];
    int nj, t0;
    hb_r = 0.1; sb_r = -0.2;
    hog_bias = score_t'(longint'(hb_r * Q28));
    sf_bias  = score_t'(longint'(sb_r * Q28));
    make_image();
    reference_blocks();
    for (int p = 0; p < WIN_BLKS; p++) begin
      for (int i = 0; i < M_HIST; i++) wh[p][i] = shortint'($urandom_range(0, 8191)) - 16'sd4096;
      for (int k = 0; k < N_PAIRS; k++) ws[p][k] = shortint'($urandom_range(0, 8191)) - 16'sd4096;
    end
    // windows to judge
    nj = 0;
    for (int x = 0; x < rNWX; x++) for (int y = 0; y < rNWY; y++) begin
      judged[x][y] = 0;
      if (SAMPLE_WIN == 0 || $urandom_range(0, NWX * NWY - 1) < SAMPLE_WIN) begin
        if (!win_amb(x, y)) begin
          judged[x][y] = 1;
          hog_ref[x][y] = wscore_hog(x, y);
          sf_ref[x][y]  = wscore_sf(x, y);
          hv.push_back(hog_ref[x][y]);
          nj++;
        end
      end
    end
    hv.sort();
    alpha_r = (hv.size() > 2) ? (hv[hv.size() * ALPHA_PCT / 100] + hv[hv.size() * ALPHA_PCT / 100 - 1]) / 2.0 : 0.0;
    for (int x = 0; x < rNWX; x++) for (int y = 0; y < rNWY; y++)
      if (judged[x][y] && hog_ref[x][y] > alpha_r) sv.push_back(sf_ref[x][y]);
    sv.sort();
    thr_r = (sv.size() > 1) ? (sv[sv.size() / 2 - 1] + sv[sv.size() / 2]) / 2.0 : 0.0;
    tol_h = 0.05 + 0.01 * absr(alpha_r);
    tol_s = 0.05 + 0.01 * absr(thr_r);
    hog_alpha    = score_t'(longint'(alpha_r * Q28));
    sf_threshold = score_t'(longint'(thr_r * Q28));
    $display("%0d of %0d windows judged; alpha %f, threshold %f", nj, NWX * NWY, alpha_r, thr_r);

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
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
    img_w = coord_t'(W); img_h = coord_t'(H);
    start = 1; @(posedge clk); #1 start = 0;
    t0 = cyc;
    for (int x = 0; x < rW; x++) for (int y = 0; y < rH; y++) begin
      #1 pix_valid = 1; pix = pix_t'(img[x][y]);
      // pix_ready only changes at a rising edge: sample it mid-cycle, then let the edge take it
      @(negedge clk);
      while (!pix_ready) @(negedge clk);
      @(posedge clk);
      #1 pix_valid = 0;
    end
    while (!frame_done) @(posedge clk);
    $display("frame of %0d x %0d pixels took %0d clocks", W, H, cyc - t0);
    repeat (3) @(posedge clk);

    for (int x = 0; x < rNWX; x++) for (int y = 0; y < rNWY; y++) if (judged[x][y]) begin
      bit kept_r, amb;
      kept_r = hog_ref[x][y] > alpha_r;
      amb = absr(hog_ref[x][y] - alpha_r) < tol_h || absr(sf_ref[x][y] - thr_r) < tol_s;
      if (!amb) begin
        checks++;
        if (detected[x][y] != (kept_r && sf_ref[x][y] > thr_r)) begin
          failures++; $display("window %0d,%0d detected=%0b hog %f sf %f", x, y, detected[x][y], hog_ref[x][y], sf_ref[x][y]);
        end
      end
    end
    $display("largest score error: HOG %f, Sparse FIND %f", max_eh, max_es);
    checks++;
    if (n_win != NWX * NWY) begin failures++; $display("%0d HOG windows", n_win); end
    checks++;
    if (n_pair != WB * ((HB + 1) / 2)) begin failures++; $display("%0d block pairs", n_pair); end
    $display("events: stop %0d, wait %0d, rejected %0d of %0d, pairs %0d (skipped %0d, worked %0d), detections %0d",
             n_stop, n_wait, n_rej, n_win, n_pair, n_skip, n_shared, n_det);
    checks++; if (n_stop == 0) begin failures++; $display("stop signal never raised"); end
    checks++; if (n_rej == 0)  begin failures++; $display("no window rejected"); end
    checks++; if (n_skip == 0) begin failures++; $display("no block pair skipped"); end
    checks++; if (n_shared == 0) begin failures++; $display("no block pair worked"); end
    checks++; if (n_det == 0)  begin failures++; $display("no detection"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
