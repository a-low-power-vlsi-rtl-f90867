// svm_mac: one MAC module of an SVM calculation core.
//
// It owns one block position (row j of core c) of every detection window that passes through
// it, so it always uses the coefficient of that position. Each clock it adds
// sum(feature * coefficient) over the LANES lanes that are valid, sorted by the block group the
// lane belongs to (GROUP accumulators: 1 for the HOG stage, 2 when blocks A and B of the Sparse
// FIND stage are processed together). A group whose enable is low accumulates nothing, which is
// the document's enable signal that switches off MACs of rejected windows. clear zeroes the
// accumulators (it wins over accumulation).
//
// Timing: acc is registered; a lane presented in clock t is in acc after edge t.
module svm_mac
  import sfind_pkg::*;
#(
  parameter int unsigned LANES = 4,
  parameter int unsigned GROUP = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic [GROUP-1:0] en,
  input  logic [LANES-1:0] lane_valid,
  input  logic [LANES-1:0] lane_grp,
  input  logic [LANES-1:0][FEAT_W-1:0] lane_feat,
  input  logic [LANES-1:0][COEF_W-1:0] lane_coef,
  output score_t acc [GROUP]
);
  score_t sum  [GROUP];
  score_t prod [LANES];
  always_comb begin
    // one multiplier per lane, its product steered to the lane's group
    for (int l = 0; l < LANES; l++)
      prod[l] = SCORE_W'($signed({1'b0, lane_feat[l]}) * $signed(lane_coef[l]));
    for (int g = 0; g < GROUP; g++) begin
      sum[g] = acc[g];
      for (int l = 0; l < LANES; l++) begin
        if (lane_valid[l] && (int'(lane_grp[l]) == g) && en[g]) sum[g] += prod[l];
      end
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < GROUP; g++) acc[g] <= '0;
    end else begin
      for (int g = 0; g < GROUP; g++) acc[g] <= clear ? '0 : sum[g];
    end
  end
endmodule
