// tb_svm_classifier: self-checking test of svm_classifier (5 cores x 15 MACs, 2 blocks per step).
//
// A 7 x 19 block grid with 5 random features per block and random coefficients for all 75
// window positions is walked column by column, two blocks per step (the last step of a column
// has no block B). A random map marks windows as kept; every MAC of a window that is not kept
// is disabled. Each of the 3 x 5 windows must be reported exactly once, one clock after the
// step of its last block, with score = bias + sum over its 75 blocks of feature * coefficient
// (computed directly) when kept, and exactly the bias when not kept; the detector bit must be
// score > threshold.
module tb_svm_classifier;
  import sfind_pkg::*;
  localparam int WB = 7, HB = 19, F = 5, L = 2, G = 2;
  localparam int NM = WIN_BLKS;

  logic clk = 0, rst_n = 0;
  logic [L-1:0] lane_valid = '0, lane_grp = '0;
  logic [L-1:0][FEAT_W-1:0] lane_feat;
  logic [L-1:0][NM-1:0][COEF_W-1:0] lane_coef;
  logic [G-1:0][NM-1:0] mac_en;
  logic step = 0; coord_t bx, by; logic [G-1:0] grp_valid;
  score_t bias, threshold;
  logic [G-1:0] res_valid, res_pass; coord_t res_wx [G], res_wy [G]; score_t res_score [G];

  int checks = 0, failures = 0, nres = 0;
  int feat [WB][HB][F];
  shortint w [NM][F];
  bit kept [WB][HB];
  bit seen [WB][HB];

  svm_classifier #(.LANES(L), .GROUP(G), .MAX_BROWS(HB)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit win_exists(int x, int y);
    return x >= 0 && y >= 0 && x + 5 <= WB && y + 15 <= HB;
  endfunction

  function automatic longint ref_score(int x, int y);
    longint s = longint'(bias);
    for (int c = 0; c < 5; c++) for (int j = 0; j < 15; j++) for (int f = 0; f < F; f++)
      s += longint'(feat[x+c][y+j][f]) * longint'(w[c*15+j][f]);
    return s;
  endfunction

  always @(posedge clk) begin
    for (int g = 0; g < G; g++) if (rst_n && res_valid[g]) begin
      int x, y; longint e;
      x = int'(res_wx[g]); y = int'(res_wy[g]);
      nres++;
      checks++;
      if (!win_exists(x, y) || seen[x][y]) begin failures++; $display("bad/duplicate window %0d,%0d", x, y); end
      else begin
        seen[x][y] = 1;
        e = kept[x][y] ? ref_score(x, y) : longint'(bias);
        checks++;
        if (longint'(res_score[g]) != e) begin failures++; $display("win %0d,%0d score %0d exp %0d", x, y, res_score[g], e); end
        checks++;
        if (res_pass[g] != (res_score[g] > threshold)) begin failures++; $display("detector bit"); end
      end
    end
  end

  initial begin
    bias = score_t'(-12345); threshold = '0;
    for (int x = 0; x < WB; x++) for (int y = 0; y < HB; y++) begin
      kept[x][y] = ($urandom_range(0, 2) != 0);
      for (int f = 0; f < F; f++) feat[x][y][f] = $urandom_range(0, 65535);
    end
    for (int p = 0; p < NM; p++) for (int f = 0; f < F; f++) w[p][f] = shortint'($urandom());
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int x = 0; x < WB; x++) begin
      for (int y = 0; y < HB; y += 2) begin
        bx = coord_t'(x); by = coord_t'(y);
        grp_valid = {(y + 1 < HB), 1'b1};
        for (int g = 0; g < G; g++) for (int c = 0; c < 5; c++) for (int j = 0; j < 15; j++)
          mac_en[g][c*15+j] = win_exists(x - c, y + g - j) && kept[x-c][y+g-j];
        for (int f = 0; f < F; f++) begin
          for (int l = 0; l < L; l++) begin
            lane_valid[l] = (l == 0) || (y + 1 < HB);
            lane_grp[l]   = l[0];
            lane_feat[l]  = FEAT_W'(feat[x][(l == 0) ? y : ((y + 1 < HB) ? y + 1 : y)][f]);
            for (int p = 0; p < NM; p++) lane_coef[l][p] = w[p][f];
          end
          @(posedge clk); #1;
        end
        lane_valid = '0;
        step = 1;
        @(posedge clk); #1;
        step = 0;
      end
    end
    repeat (3) @(posedge clk);
    checks++;
    if (nres != (WB - 4) * (HB - 14)) begin failures++; $display("%0d windows reported", nres); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
