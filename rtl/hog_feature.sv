// hog_feature: normalised HOG features h_i * sqrt(a) for LANES histogram elements per clock.
//
// With a = 1/sum(h^2) from normalize_coef, h_i * sqrt(a) is the L2-normalised HOG feature in
// [0, 1]. sqrt(a) arrives as r_mant * 2^-17 * 2^-e, so the Q0.16 feature is
// (h_i * r_mant) >> (1 + e), saturated to 16 bits (only h_i = sqrt(S) reaches 1.0). The
// document names this step ("HOG Feature Calculation") between the normalisation coefficient
// and the HOG classifier; the arithmetic is this design's.
//
// Timing: one register stage; out_valid follows in_valid by one clock.
module hog_feature
  import sfind_pkg::*;
#(
  parameter int unsigned LANES = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic [LANES-1:0][BIN_W-1:0] h,
  input  logic [RM_W-1:0]  r_mant,
  input  logic [EXP_W-1:0] e,
  output logic   out_valid,
  output logic [LANES-1:0][FEAT_W-1:0] feat
);
  logic [LANES-1:0][FEAT_W-1:0] f_c;
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic [BIN_W+RM_W-1:0] p;
      p = h[l] * r_mant;
      p = p >> (e + 1);
      f_c[l] = (p > (BIN_W+RM_W)'(16'hFFFF)) ? 16'hFFFF : FEAT_W'(p);
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      feat      <= '0;
    end else begin
      out_valid <= in_valid;
      feat      <= f_c;
    end
  end
endmodule
