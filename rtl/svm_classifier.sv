// svm_classifier: the SVM classification circuit, N_CORES cores of N_MACS MAC modules,
// the intermediate-result RAM and the detector.
//
// A block belongs to up to 75 detection windows of 5 x 15 blocks. MAC (c, j) (core c, row j)
// works on the window in which the current block sits at column c and row j, i.e. window
// (bx - c, by - j), always with the coefficients of position p = c*15 + j. Blocks of one block
// column arrive top to bottom. When a block is done (step), every MAC adds its dot product to
// the partial score handed down from the MAC of the row above and passes the sum on: for the
// next block that window sits one row lower. Row 0 of core 0 starts a window with the bias; row
// 0 of core c > 0 takes the partial score that core c-1 left in the intermediate-result RAM
// when it finished the window's column c-1, one block column earlier. The last row of core 4
// finishes the window, and the detector compares its score with the threshold. This chain and
// the 5 x 15 arrangement follow the document; the step protocol and the RAM addressing by
// window row are this design's.
//
// With GROUP = 2 the blocks by and by+1 of the same column (blocks A and B) are classified in
// one step: B's contribution to a window is added right after A's, one MAC further down, so the
// chain moves two rows per step and two windows per core finish per step.
//
// Interface: lanes deliver features with their coefficients (one per MAC); step closes the
// block group at (bx, by) with grp_valid telling which of its blocks exist. Results (one per
// group) are registered and appear the clock after step.
//
// Lint note: the combinational sum chain reads outs[c][g-1][j-1], which the same always_comb
// wrote in an earlier loop iteration (group g-1 is computed before group g). Verilator reports
// this as an ordering warning (ALWCOMBORDER); every element is assigned before it is read, so
// the block is purely combinational and implies no latch.
module svm_classifier
  import sfind_pkg::*;
#(
  parameter int unsigned LANES   = 4,
  parameter int unsigned GROUP   = 1,
  parameter int unsigned N_CORES = WIN_BW,
  parameter int unsigned N_MACS  = WIN_BH,
  parameter int unsigned MAX_BROWS = MAX_H / P_CELL - 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [LANES-1:0] lane_valid,
  input  logic [LANES-1:0] lane_grp,
  input  logic [LANES-1:0][FEAT_W-1:0] lane_feat,
  input  logic [LANES-1:0][N_CORES*N_MACS-1:0][COEF_W-1:0] lane_coef,
  input  logic [GROUP-1:0][N_CORES*N_MACS-1:0] mac_en,
  input  logic   step,
  input  coord_t bx,
  input  coord_t by,
  input  logic [GROUP-1:0] grp_valid,
  input  score_t bias,
  input  score_t threshold,
  output logic [GROUP-1:0] res_valid,
  output logic [GROUP-1:0] res_pass,
  output coord_t res_wx [GROUP],
  output coord_t res_wy [GROUP],
  output score_t res_score [GROUP]
);
  localparam int unsigned NM = N_CORES * N_MACS;
  localparam int unsigned RW = $clog2(MAX_BROWS);

  score_t acc   [NM][GROUP];
  score_t chain [N_CORES][N_MACS];
  score_t inter_ram [N_CORES-1][MAX_BROWS];   // SVM calculation intermediate result RAM

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    for (genvar j = 0; j < N_MACS; j++) begin : g_mac
      logic [LANES-1:0][COEF_W-1:0] cf;
      logic [GROUP-1:0]             en;
      always_comb begin
        for (int l = 0; l < LANES; l++) cf[l] = lane_coef[l][c*N_MACS+j];
        for (int g = 0; g < GROUP; g++) en[g] = mac_en[g][c*N_MACS+j];
      end
      svm_mac #(.LANES(LANES), .GROUP(GROUP)) u_mac (
        .clk, .rst_n, .clear(step), .en,
        .lane_valid, .lane_grp, .lane_feat, .lane_coef(cf),
        .acc(acc[c*N_MACS+j])
      );
    end
  end

  // Chain update at a step. Lanes presented in the step clock itself are not counted, so the
  // feeding side keeps them idle then.
  score_t outs [N_CORES][GROUP][N_MACS];
  coord_t byg  [GROUP];
  always_comb begin
    for (int g = 0; g < GROUP; g++) byg[g] = by + coord_t'(g);
    for (int c = 0; c < N_CORES; c++) begin
      for (int g = 0; g < GROUP; g++) begin
        for (int j = 0; j < N_MACS; j++) begin
          score_t prev;
          if (j == 0)      prev = (c == 0) ? bias : inter_ram[(c == 0) ? 0 : c-1][byg[g][RW-1:0]];
          else if (g == 0) prev = chain[c][j-1];
          else             prev = outs[c][(g == 0) ? 0 : g-1][j-1];
          outs[c][g][j] = prev + acc[c*N_MACS+j][g];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CORES; c++)
        for (int j = 0; j < N_MACS; j++) chain[c][j] <= '0;
    end else if (step) begin
      for (int c = 0; c < N_CORES; c++)
        for (int j = 0; j < N_MACS; j++) chain[c][j] <= outs[c][GROUP-1][j];
    end
  end

  always_ff @(posedge clk) begin
    if (step) begin
      for (int c = 0; c < N_CORES - 1; c++)
        for (int g = 0; g < GROUP; g++)
          if (grp_valid[g] && byg[g] >= coord_t'(N_MACS - 1))
            inter_ram[c][RW'(byg[g] - coord_t'(N_MACS - 1))] <= outs[c][g][N_MACS-1];
    end
  end

  // Detector on the last MAC of the last core.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= '0;
      res_pass  <= '0;
      for (int g = 0; g < GROUP; g++) begin
        res_wx[g] <= '0; res_wy[g] <= '0; res_score[g] <= '0;
      end
    end else begin
      for (int g = 0; g < GROUP; g++) begin
        res_valid[g] <= step && grp_valid[g] && bx >= coord_t'(N_CORES - 1)
                        && byg[g] >= coord_t'(N_MACS - 1);
        res_pass[g]  <= outs[N_CORES-1][g][N_MACS-1] > threshold;
        res_wx[g]    <= bx - coord_t'(N_CORES - 1);
        res_wy[g]    <= byg[g] - coord_t'(N_MACS - 1);
        res_score[g] <= outs[N_CORES-1][g][N_MACS-1];
      end
    end
  end
endmodule
