// sfind_pkg: types and constants shared by the Sparse FIND object-recognition core.
//
// Feature geometry follows the document: cells of P x P = 4 x 4 pixels, D = 8 orientation
// bins, blocks of Q x Q = 2 x 2 cells (M = 32 histogram elements per block), a 24 x 64 pixel
// detection window shifted by 4 pixels, which is 5 x 15 = 75 overlapping blocks.
// The fixed-point formats are this design's own choice:
//   magnitude  10-bit unsigned integer, carrying the CORDIC gain (about 1.647)
//   bin        16-bit unsigned sum of magnitudes over a cell
//   feature    16-bit unsigned Q0.16 (HOG feature and Sparse FIND feature)
//   coef       16-bit signed Q3.12 SVM coefficient
//   score      48-bit signed Q19.28 SVM score; bias and thresholds use the same format
package sfind_pkg;
  localparam int unsigned P_CELL   = 4;
  localparam int unsigned D_BINS   = 8;
  localparam int unsigned Q_BLOCK  = 2;
  localparam int unsigned M_HIST   = D_BINS * Q_BLOCK * Q_BLOCK;   // 32
  localparam int unsigned N_PAIRS  = M_HIST * (M_HIST - 1) / 2;   // 496
  localparam int unsigned WIN_BW   = 5;    // window width in blocks  (24/4 - 1)
  localparam int unsigned WIN_BH   = 15;   // window height in blocks (64/4 - 1)
  localparam int unsigned WIN_BLKS = WIN_BW * WIN_BH;               // 75

  localparam int unsigned PIX_W   = 8;
  localparam int unsigned MAG_W   = 10;
  localparam int unsigned BIN_W   = 16;
  localparam int unsigned FEAT_W  = 16;
  localparam int unsigned COEF_W  = 16;
  localparam int unsigned SCORE_W = 48;
  localparam int unsigned RM_W    = 18;  // Q1.17 mantissa of sqrt(a) and of a
  localparam int unsigned EXP_W   = 5;

  // Frame limits: HDTV, one pyramid level at a time.
  localparam int unsigned MAX_W  = 1920;
  localparam int unsigned MAX_H  = 1080;
  localparam int unsigned COORD_W = 11;

  typedef logic [PIX_W-1:0]          pix_t;
  typedef logic [MAG_W-1:0]          mag_t;
  typedef logic [$clog2(D_BINS)-1:0] bin_idx_t;
  typedef logic [BIN_W-1:0]          bin_t;
  typedef logic [FEAT_W-1:0]         feat_t;
  typedef logic signed [COEF_W-1:0]  coef_t;
  typedef logic signed [SCORE_W-1:0] score_t;
  typedef logic [COORD_W-1:0]        coord_t;

  typedef bin_t cell_hist_t [D_BINS];
  typedef bin_t block_hist_t [M_HIST];

  // One block after the common stage: its histogram, the elements above the sparsification
  // threshold, the normalisation coefficient and its place in the block grid.
  typedef struct packed {
    logic [M_HIST-1:0][BIN_W-1:0] hist;
    logic [M_HIST-1:0]            sel;     // h_i > th
    logic [RM_W-1:0]              r_mant;  // sqrt(a) = r_mant * 2^-17 * 2^-e
    logic [RM_W-1:0]              a_mant;  // a       = a_mant * 2^-17 * 4^-e
    logic [EXP_W-1:0]             e;
    coord_t                       bx;
    coord_t                       by;
  } block_rec_t;

  // i and j of the k-th pair (i < j) in lexicographic order (0,1),(0,2),...,(M-2,M-1).
  function automatic int unsigned pair_i(int unsigned k);
    int unsigned rem = k;
    for (int unsigned i = 0; i < M_HIST; i++) begin
      if (rem < M_HIST - 1 - i) return i;
      rem -= M_HIST - 1 - i;
    end
    return 0;
  endfunction

  function automatic int unsigned pair_j(int unsigned k);
    int unsigned rem = k;
    for (int unsigned i = 0; i < M_HIST; i++) begin
      if (rem < M_HIST - 1 - i) return i + 1 + rem;
      rem -= M_HIST - 1 - i;
    end
    return 0;
  endfunction
endpackage
