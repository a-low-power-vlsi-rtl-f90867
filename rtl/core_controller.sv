// core_controller: the Sparse FIND core controller with the HOG stage and the Sparse FIND stage.
//
// Blocks come from the common stage in column-major order. The HOG stage takes them from a
// small FIFO, stores each in a block buffer that holds BUF_COLS block columns, feeds its HOG
// features (LANES_HOG elements per clock) with their coefficients to the HOG classifier and
// steps the classifier once per block. Each finished window whose HOG score is above the
// rejection threshold alpha is marked "kept" in a map of window columns; the others are
// rejected. A block column counts as done for the HOG stage once its last block has stepped
// and the window results have been written.
//
// The Sparse FIND stage follows column by column. It may start column s once the HOG stage has
// finished column min(s + 4, Wb - 1), so every window containing a block of s is decided. It
// walks the column two blocks at a time (blocks A = by and B = by + 1, the block-parallel
// processing). For each of the 2 x 75 MAC slots it looks up whether that window is kept; a block
// with no kept window contributes no features, and a pair with none at all is skipped in one
// clock. Otherwise sparse_feature_calc issues the needed coefficient reads and features, and
// the Sparse FIND classifier steps when they are done. Finished windows that were kept and
// score above the detection threshold are reported as detections.
//
// Stop signal: the HOG stage waits when the block buffer slot it needs still holds a column the
// Sparse FIND stage has not finished; the FIFO then fills and blk_in_ready (the enable of the
// common stage) goes low, which stops the common stage and the HOG stage as the document
// describes. The two stages otherwise run concurrently. The FIFO, the buffer depths, the
// handshakes and the event outputs are this design's own.
//
// Frame: start latches the image size (one pyramid level, img_w x img_h pixels, at least
// 24 x 64). frame_done pulses when the last block column has left the Sparse FIND stage.
// Coefficients are written one at a time: coef_wr_sel 0 = HOG (idx 0..31), 1 = Sparse FIND
// (idx = pair 0..495); coef_wr_pos = c*15 + j is the block's position in the window.
module core_controller
  import sfind_pkg::*;
#(
  parameter int unsigned LANES_HOG  = 4,
  parameter int unsigned N_BANKS    = 16,
  parameter int unsigned BUF_COLS   = 8,     // power of two, at least 8
  parameter int unsigned FIFO_DEPTH = 8,
  parameter int unsigned MAX_BROWS  = MAX_H / P_CELL - 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  coord_t img_w,
  input  coord_t img_h,
  input  logic   blk_in_valid,
  input  block_rec_t blk_in,
  output logic   blk_in_ready,
  input  logic   coef_wr_en,
  input  logic   coef_wr_sel,
  input  logic [6:0] coef_wr_pos,
  input  logic [9:0] coef_wr_idx,
  input  coef_t  coef_wr_data,
  input  score_t hog_bias,
  input  score_t hog_alpha,
  input  score_t sf_bias,
  input  score_t sf_threshold,
  output logic [1:0] det_valid,
  output coord_t det_wx [2],
  output coord_t det_wy [2],
  output score_t det_score [2],
  output logic   frame_busy,
  output logic   frame_done,
  // events, one clock each
  output logic   ev_stop,          // common stage stopped
  output logic   ev_buf_wait,      // HOG stage waits for the Sparse FIND stage
  output logic   ev_hog_window,    // a window finished the HOG stage
  output logic   ev_hog_reject,    // ... and was rejected
  output logic   ev_sf_pair,       // a block pair finished the Sparse FIND stage
  output logic   ev_sf_skip,       // ... without any feature work
  output logic [5:0] sf_pair_cycles // access clocks of that pair
);
  localparam int unsigned BW        = $clog2(BUF_COLS);
  localparam int unsigned KW        = BW + 1;
  localparam int unsigned RW        = $clog2(MAX_BROWS);
  localparam int unsigned FW        = $clog2(FIFO_DEPTH) + 1;
  localparam int unsigned WRW       = $clog2(MAX_BROWS - WIN_BH + 1);
  localparam int unsigned KEEP_COLS = 1 << KW;     // window-column ring of the kept map
  localparam int unsigned MAX_WROWS = MAX_BROWS - WIN_BH + 1;
  localparam int unsigned HSTEPS    = M_HIST / LANES_HOG;
  localparam int unsigned HAW       = (HSTEPS > 1) ? $clog2(HSTEPS) : 1;
  localparam int unsigned SAW       = $clog2((N_PAIRS + N_BANKS - 1) / N_BANKS);

  typedef struct packed {
    logic [M_HIST-1:0][BIN_W-1:0] hist;
    logic [M_HIST-1:0]            sel;
    logic [RM_W-1:0]              a_mant;
    logic [EXP_W-1:0]             e;
  } buf_ent_t;

  // ---------------- frame ----------------
  coord_t wb, hb;            // block grid
  coord_t hog_cols_done;     // HOG stage finished columns 0 .. hog_cols_done-1
  coord_t sf_col;            // Sparse FIND stage works on this column

  // ---------------- input FIFO ----------------
  block_rec_t fifo [FIFO_DEPTH];
  logic [$clog2(FIFO_DEPTH):0] f_cnt;
  logic [$clog2(FIFO_DEPTH)-1:0] f_rd, f_wr;
  logic f_pop;
  block_rec_t head;
  assign head         = fifo[f_rd];
  assign blk_in_ready = f_cnt != ($clog2(FIFO_DEPTH)+1)'(FIFO_DEPTH);
  assign ev_stop      = !blk_in_ready;

  always_ff @(posedge clk) begin
    if (blk_in_valid && blk_in_ready) fifo[f_wr] <= blk_in;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_cnt <= '0; f_rd <= '0; f_wr <= '0;
    end else begin
      if (blk_in_valid && blk_in_ready) f_wr <= f_wr + 1'b1;
      if (f_pop) f_rd <= f_rd + 1'b1;
      f_cnt <= f_cnt + FW'(blk_in_valid && blk_in_ready) - FW'(f_pop);
    end
  end

  // ---------------- block buffer and kept-window map ----------------
  buf_ent_t blk_buf [1 << BW][MAX_BROWS];
  logic [MAX_WROWS-1:0] kept [KEEP_COLS];

  function automatic logic win_ok(coord_t wx, coord_t wy, int sx, int sy,
                                  coord_t w_b, coord_t h_b);
    // window (wx + sx, wy + sy) exists in the frame
    int x = int'(wx) + sx;
    int y = int'(wy) + sy;
    return x >= 0 && y >= 0 && x + int'(WIN_BW) <= int'(w_b) && y + int'(WIN_BH) <= int'(h_b);
  endfunction

  // ---------------- HOG stage ----------------
  typedef enum logic [2:0] {H_IDLE, H_FEED, H_LAST, H_STEP, H_DONE1, H_DONE2} hstate_t;
  hstate_t hs;
  block_rec_t hcur;
  logic [HAW-1:0] hcnt;
  logic hog_can_pop;

  assign hog_can_pop = (hs == H_IDLE) && (f_cnt != '0) && frame_busy
                       && (int'(head.bx) < int'(sf_col) + int'(BUF_COLS));
  assign f_pop       = hog_can_pop;
  assign ev_buf_wait = (hs == H_IDLE) && (f_cnt != '0) && frame_busy && !hog_can_pop;

  logic [LANES_HOG-1:0][BIN_W-1:0] hf_h;
  logic hf_valid;
  logic [LANES_HOG-1:0][FEAT_W-1:0] hf_feat;
  logic [LANES_HOG-1:0][WIN_BLKS-1:0][COEF_W-1:0] hog_coef;
  logic [LANES_HOG-1:0][HAW-1:0] hog_addr;
  always_comb begin
    for (int l = 0; l < LANES_HOG; l++) begin
      hf_h[l]     = hcur.hist[int'(hcnt) * LANES_HOG + l];
      hog_addr[l] = hcnt;
    end
  end

  hog_feature #(.LANES(LANES_HOG)) u_hog_feat (
    .clk, .rst_n, .in_valid(hs == H_FEED), .h(hf_h), .r_mant(hcur.r_mant), .e(hcur.e),
    .out_valid(hf_valid), .feat(hf_feat)
  );

  svm_coef_ram #(.N_FEAT(M_HIST), .BANKS(LANES_HOG)) u_hog_ram (
    .clk, .wr_en(coef_wr_en && !coef_wr_sel), .wr_pos(coef_wr_pos), .wr_idx(coef_wr_idx),
    .wr_data(coef_wr_data), .rd_en({LANES_HOG{hs == H_FEED}}), .rd_addr(hog_addr),
    .rd_data(hog_coef)
  );

  logic [0:0] hres_valid, hres_pass;
  coord_t hres_wx [1], hres_wy [1];
  score_t hres_score [1];

  svm_classifier #(.LANES(LANES_HOG), .GROUP(1), .MAX_BROWS(MAX_BROWS)) u_hog_svm (
    .clk, .rst_n,
    .lane_valid({LANES_HOG{hf_valid}}), .lane_grp('0), .lane_feat(hf_feat),
    .lane_coef(hog_coef), .mac_en('1),
    .step(hs == H_STEP), .bx(hcur.bx), .by(hcur.by), .grp_valid(1'b1),
    .bias(hog_bias), .threshold(hog_alpha),
    .res_valid(hres_valid), .res_pass(hres_pass), .res_wx(hres_wx), .res_wy(hres_wy),
    .res_score(hres_score)
  );

  assign ev_hog_window = hres_valid[0];
  assign ev_hog_reject = hres_valid[0] && !hres_pass[0];

  always_ff @(posedge clk) begin
    if (f_pop) blk_buf[head.bx[BW-1:0]][head.by[RW-1:0]] <= '{hist: head.hist, sel: head.sel,
                                                       a_mant: head.a_mant, e: head.e};
    if (hres_valid[0]) kept[hres_wx[0][KW-1:0]][hres_wy[0][WRW-1:0]] <= hres_pass[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hs <= H_IDLE; hcnt <= '0; hcur <= '0; hog_cols_done <= '0;
    end else if (start) begin
      hs <= H_IDLE; hog_cols_done <= '0;
    end else begin
      case (hs)
        H_IDLE:  if (hog_can_pop) begin hcur <= head; hcnt <= '0; hs <= H_FEED; end
        H_FEED:  begin
                   hcnt <= hcnt + 1'b1;
                   if (int'(hcnt) == HSTEPS - 1) hs <= H_LAST;
                 end
        H_LAST:  hs <= H_STEP;
        H_STEP:  hs <= (hcur.by == hb - 1'b1) ? H_DONE1 : H_IDLE;
        H_DONE1: hs <= H_DONE2;
        H_DONE2: begin hog_cols_done <= hcur.bx + 1'b1; hs <= H_IDLE; end
        default: hs <= H_IDLE;
      endcase
    end
  end

  // ---------------- Sparse FIND stage ----------------
  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_CHECK, S_RUN, S_STEP} sstate_t;
  sstate_t ss;
  coord_t  sby;
  logic    b_ok;
  logic [1:0][WIN_BLKS-1:0] sf_en;
  logic need_a, need_b;
  coord_t  col_need;

  assign b_ok     = (sby + 1'b1) < hb;
  assign col_need = ((sf_col + coord_t'(WIN_BW)) < wb) ? sf_col + coord_t'(WIN_BW) : wb;

  always_comb begin
    for (int g = 0; g < 2; g++)
      for (int c = 0; c < WIN_BW; c++)
        for (int j = 0; j < WIN_BH; j++) begin
          coord_t wx, wy;
          wx = sf_col - coord_t'(c);
          wy = sby + coord_t'(g) - coord_t'(j);
          sf_en[g][c*WIN_BH+j] = win_ok(sf_col, sby, -c, g - j, wb, hb)
                                 && kept[wx[KW-1:0]][wy[WRW-1:0]];
        end
    need_a = |sf_en[0];
    need_b = |sf_en[1] && b_ok;
  end

  buf_ent_t ent_a, ent_b;
  assign ent_a = blk_buf[sf_col[BW-1:0]][sby[RW-1:0]];
  assign ent_b = blk_buf[sf_col[BW-1:0]][b_ok ? RW'(sby + 1'b1) : sby[RW-1:0]];

  logic sfc_busy, sfc_done;
  logic [N_BANKS-1:0] sf_rd_en, sf_lane_valid, sf_lane_grp;
  logic [N_BANKS-1:0][SAW-1:0] sf_rd_addr;
  logic [N_BANKS-1:0][FEAT_W-1:0] sf_lane_feat;
  logic [N_BANKS-1:0][WIN_BLKS-1:0][COEF_W-1:0] sf_coef;
  logic [SAW+1:0] sfc_cycles;

  sparse_feature_calc #(.N_BANKS(N_BANKS)) u_sfc (
    .clk, .rst_n, .load(ss == S_CHECK && (need_a || need_b)),
    .hist_a(ent_a.hist), .sel_a(need_a ? ent_a.sel : '0), .a_mant_a(ent_a.a_mant), .e_a(ent_a.e),
    .b_valid(need_b),
    .hist_b(ent_b.hist), .sel_b(ent_b.sel), .a_mant_b(ent_b.a_mant), .e_b(ent_b.e),
    .busy(sfc_busy), .rd_en(sf_rd_en), .rd_addr(sf_rd_addr),
    .lane_valid(sf_lane_valid), .lane_grp(sf_lane_grp), .lane_feat(sf_lane_feat),
    .done(sfc_done), .cycles(sfc_cycles)
  );

  svm_coef_ram #(.N_FEAT(N_PAIRS), .BANKS(N_BANKS)) u_sf_ram (
    .clk, .wr_en(coef_wr_en && coef_wr_sel), .wr_pos(coef_wr_pos), .wr_idx(coef_wr_idx),
    .wr_data(coef_wr_data), .rd_en(sf_rd_en), .rd_addr(sf_rd_addr), .rd_data(sf_coef)
  );

  logic [1:0] sres_valid, sres_pass;
  coord_t sres_wx [2], sres_wy [2];
  score_t sres_score [2];

  svm_classifier #(.LANES(N_BANKS), .GROUP(2), .MAX_BROWS(MAX_BROWS)) u_sf_svm (
    .clk, .rst_n,
    .lane_valid(sf_lane_valid), .lane_grp(sf_lane_grp), .lane_feat(sf_lane_feat),
    .lane_coef(sf_coef), .mac_en(sf_en),
    .step(ss == S_STEP), .bx(sf_col), .by(sby), .grp_valid({b_ok, 1'b1}),
    .bias(sf_bias), .threshold(sf_threshold),
    .res_valid(sres_valid), .res_pass(sres_pass), .res_wx(sres_wx), .res_wy(sres_wy),
    .res_score(sres_score)
  );

  // Detector output: kept windows above the Sparse FIND threshold.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      det_valid <= '0;
      for (int g = 0; g < 2; g++) begin det_wx[g] <= '0; det_wy[g] <= '0; det_score[g] <= '0; end
    end else begin
      for (int g = 0; g < 2; g++) begin
        det_valid[g] <= sres_valid[g] && sres_pass[g] && kept[sres_wx[g][KW-1:0]][sres_wy[g][WRW-1:0]];
        det_wx[g]    <= sres_wx[g];
        det_wy[g]    <= sres_wy[g];
        det_score[g] <= sres_score[g];
      end
    end
  end

  logic skip_pair;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ss <= S_IDLE; sby <= '0; sf_col <= '0; frame_busy <= 1'b0; frame_done <= 1'b0;
      wb <= '0; hb <= '0; skip_pair <= 1'b0;
      ev_sf_pair <= 1'b0; ev_sf_skip <= 1'b0; sf_pair_cycles <= '0;
    end else begin
      frame_done <= 1'b0;
      ev_sf_pair <= 1'b0;
      ev_sf_skip <= 1'b0;
      if (start) begin
        wb <= (img_w >> 2) - 1'b1;
        hb <= (img_h >> 2) - 1'b1;
        sf_col <= '0; sby <= '0; frame_busy <= 1'b1; ss <= S_WAIT;
      end else begin
        case (ss)
          S_IDLE:  ;
          S_WAIT:  if (hog_cols_done >= col_need) begin sby <= '0; ss <= S_CHECK; end
          S_CHECK: begin
                     skip_pair <= !(need_a || need_b);
                     ss <= (need_a || need_b) ? S_RUN : S_STEP;
                   end
          S_RUN:   if (sfc_done) ss <= S_STEP;
          S_STEP:  begin
                     ev_sf_pair     <= 1'b1;
                     ev_sf_skip     <= skip_pair;
                     sf_pair_cycles <= skip_pair ? '0 : 6'(sfc_cycles);
                     if (sby + coord_t'(2) >= hb) begin
                       sby <= '0;
                       sf_col <= sf_col + 1'b1;
                       if (sf_col + 1'b1 == wb) begin
                         frame_busy <= 1'b0; frame_done <= 1'b1; ss <= S_IDLE;
                       end else ss <= S_WAIT;
                     end else begin
                       sby <= sby + coord_t'(2);
                       ss  <= S_CHECK;
                     end
                   end
          default: ss <= S_IDLE;
        endcase
      end
    end
  end
endmodule
