// sparse_threshold: sparsification threshold th = k * (1/m) * sum(h_i) and the set H_D.
//
// The document defines th = k * mean(H) over the m = 32 elements of a block and keeps only the
// elements with h_i > th for the Sparse FIND correlation; its chip uses k = 1.0. Here k is
// given as K_X2 = 2k (k in steps of 0.5, the steps the document evaluates) so that the test
// h_i > th becomes the exact integer comparison 2*m*h_i > K_X2 * sum(h_i). No division and
// no rounding is involved.
//
// Timing: one block per clock, one register stage (histogram and block coordinates travel
// along). Advances only when en is high.
module sparse_threshold
  import sfind_pkg::*;
#(
  parameter int unsigned K_X2 = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   in_valid,
  input  logic [M_HIST-1:0][BIN_W-1:0] hist,
  input  coord_t bx,
  input  coord_t by,
  output logic   out_valid,
  output logic [M_HIST-1:0][BIN_W-1:0] out_hist,
  output logic [M_HIST-1:0] sel,
  output coord_t obx,
  output coord_t oby
);
  localparam int unsigned SW = BIN_W + $clog2(M_HIST) + 8;

  logic [SW-1:0]     sum, rhs;
  logic [M_HIST-1:0] sel_c;

  always_comb begin
    sum = '0;
    for (int i = 0; i < M_HIST; i++) sum += SW'(hist[i]);
    rhs = sum * SW'(K_X2);
    for (int i = 0; i < M_HIST; i++) sel_c[i] = (SW'(hist[i]) * SW'(2 * M_HIST)) > rhs;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_hist <= '0; sel <= '0; obx <= '0; oby <= '0;
    end else if (en) begin
      out_valid <= in_valid;
      out_hist  <= hist;
      sel       <= sel_c;
      obx       <= bx;
      oby       <= by;
    end
  end
endmodule
