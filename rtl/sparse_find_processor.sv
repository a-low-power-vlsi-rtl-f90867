// sparse_find_processor: object-recognition core with two-stage HOG / Sparse FIND classification.
//
// One pyramid level of a grayscale image enters as a pixel stream, column by column (top to
// bottom, then the next column to the right). The common stage computes the gradient
// (gradient_unit), the 4 x 4-pixel cell histograms (cell_histogram), the 2 x 2-cell blocks
// (block_former), the sparsification threshold (sparse_threshold) and the dimensionless
// coefficient (normalize_coef). core_controller then classifies every 24 x 64-pixel window,
// shifted by 4 pixels, first with HOG features and then, for the windows the HOG stage did not
// reject, with Sparse FIND features, and reports the windows that pass as detections.
//
// Interface:
//   start, img_w, img_h   begin a level of img_w x img_h pixels (multiples of 4, at least
//                         24 x 64, at most 1920 x 1080)
//   pix_valid/pix/pix_ready  pixel stream; pix_ready is the common stage's enable, low while
//                         the controller's stop signal is active
//   coef_wr_*             SVM coefficient load (see core_controller), bias and thresholds
//   det_*                 up to two detections per clock: window position in blocks (pixel
//                         position = 4 * block), Sparse FIND score (Q19.28)
//   frame_done            the level is finished
//   ev_*                  one-clock event strobes for monitoring
// The common stage takes one pixel per clock; its registers all advance on one enable.
module sparse_find_processor
  import sfind_pkg::*;
#(
  parameter int unsigned LANES_HOG = 4,
  parameter int unsigned N_BANKS   = 16,
  parameter int unsigned BUF_COLS  = 8,
  parameter int unsigned K_X2      = 2,
  parameter int unsigned MAX_HEIGHT = MAX_H
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  coord_t img_w,
  input  coord_t img_h,
  input  logic   pix_valid,
  input  pix_t   pix,
  output logic   pix_ready,
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
  output logic   ev_stop,
  output logic   ev_buf_wait,
  output logic   ev_hog_window,
  output logic   ev_hog_reject,
  output logic   ev_sf_pair,
  output logic   ev_sf_skip,
  output logic [5:0] sf_pair_cycles
);
  localparam int unsigned CROWS = MAX_HEIGHT / P_CELL;

  logic en;
  coord_t px, py, h_q;
  logic take;

  assign pix_ready = en && frame_busy;
  assign take      = pix_valid && pix_ready;

  // Pixel position counter, column-major.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      px <= '0; py <= '0; h_q <= '0;
    end else if (start) begin
      px <= '0; py <= '0; h_q <= img_h;
    end else if (take) begin
      if (py == h_q - 1'b1) begin py <= '0; px <= px + 1'b1; end
      else py <= py + 1'b1;
    end
  end

  // ---------------- common stage ----------------
  logic g_valid; mag_t g_mag; bin_idx_t g_bin; coord_t g_x, g_y;
  gradient_unit #(.MAX_HEIGHT(MAX_HEIGHT)) u_grad (
    .clk, .rst_n, .en, .in_valid(take), .pix, .x(px), .y(py),
    .out_valid(g_valid), .mag(g_mag), .bin(g_bin), .ox(g_x), .oy(g_y)
  );

  logic c_valid; logic [D_BINS-1:0][BIN_W-1:0] c_hist; coord_t c_x, c_y;
  cell_histogram #(.MAX_CELL_ROWS(CROWS)) u_cell (
    .clk, .rst_n, .en, .in_valid(g_valid), .mag(g_mag), .bin(g_bin), .x(g_x), .y(g_y),
    .cell_valid(c_valid), .cell_hist(c_hist), .cx(c_x), .cy(c_y)
  );

  logic b_valid; logic [M_HIST-1:0][BIN_W-1:0] b_hist; coord_t b_x, b_y;
  block_former #(.MAX_CELL_ROWS(CROWS)) u_blk (
    .clk, .rst_n, .en, .cell_valid(c_valid), .cell_hist(c_hist), .cx(c_x), .cy(c_y),
    .blk_valid(b_valid), .blk_hist(b_hist), .bx(b_x), .by(b_y)
  );

  logic t_valid; logic [M_HIST-1:0][BIN_W-1:0] t_hist; logic [M_HIST-1:0] t_sel;
  coord_t t_x, t_y;
  sparse_threshold #(.K_X2(K_X2)) u_thr (
    .clk, .rst_n, .en, .in_valid(b_valid), .hist(b_hist), .bx(b_x), .by(b_y),
    .out_valid(t_valid), .out_hist(t_hist), .sel(t_sel), .obx(t_x), .oby(t_y)
  );

  localparam int unsigned SIDE_W = M_HIST * BIN_W + M_HIST + 2 * COORD_W;
  logic n_valid;
  logic [RM_W-1:0] n_r, n_a; logic [EXP_W-1:0] n_e;
  logic [SIDE_W-1:0] n_side;
  normalize_coef #(.SIDE_W(SIDE_W)) u_norm (
    .clk, .rst_n, .en, .in_valid(t_valid), .hist(t_hist), .side_in({t_hist, t_sel, t_x, t_y}),
    .out_valid(n_valid), .r_mant(n_r), .a_mant(n_a), .e(n_e), .side_out(n_side)
  );

  block_rec_t rec;
  always_comb begin
    {rec.hist, rec.sel, rec.bx, rec.by} = n_side;
    rec.r_mant = n_r;
    rec.a_mant = n_a;
    rec.e      = n_e;
  end

  // ---------------- HOG and Sparse FIND stages ----------------
  core_controller #(.LANES_HOG(LANES_HOG), .N_BANKS(N_BANKS), .BUF_COLS(BUF_COLS),
                    .MAX_BROWS(CROWS - 1)) u_ctrl (
    .clk, .rst_n, .start, .img_w, .img_h,
    .blk_in_valid(n_valid), .blk_in(rec), .blk_in_ready(en),
    .coef_wr_en, .coef_wr_sel, .coef_wr_pos, .coef_wr_idx, .coef_wr_data,
    .hog_bias, .hog_alpha, .sf_bias, .sf_threshold,
    .det_valid, .det_wx, .det_wy, .det_score, .frame_busy, .frame_done,
    .ev_stop, .ev_buf_wait, .ev_hog_window, .ev_hog_reject, .ev_sf_pair, .ev_sf_skip,
    .sf_pair_cycles
  );
endmodule
