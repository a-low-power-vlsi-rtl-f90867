// normalize_coef: the dimensionless coefficient a = 1 / sum(h_i^2) of a block.
//
// The document computes a (its equation 3) so that no separate normalisation is needed, and
// uses the Newton method with 4 steps for the square-root division. This unit forms
// S = sum(h_i^2), writes S = m * 4^e with 1 <= m < 4, and refines y ~ 1/sqrt(m) by
// NEWTON_STEPS iterations of y <- y * (3 - m*y^2) / 2, seeded from a three-entry table on the
// two leading bits of m. It returns
//   sqrt(a) = r_mant * 2^-17 * 2^-e   (used by the HOG features, h_i * sqrt(a))
//   a       = a_mant * 2^-17 * 4^-e   (used by the Sparse FIND features, a * h_i * h_j)
// with r_mant, a_mant in Q1.17. A block with S = 0 gives r_mant = a_mant = 0, so all its
// features are zero. The number formats and the seed table are this design's choice.
//
// Timing: fully pipelined, NEWTON_STEPS + 3 register stages, one block per clock. A side
// vector of SIDE_W bits travels with each block. Advances only when en is high.
module normalize_coef
  import sfind_pkg::*;
#(
  parameter int unsigned NEWTON_STEPS = 4,
  parameter int unsigned SIDE_W       = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   in_valid,
  input  logic [M_HIST-1:0][BIN_W-1:0] hist,
  input  logic [SIDE_W-1:0] side_in,
  output logic   out_valid,
  output logic [RM_W-1:0]  r_mant,
  output logic [RM_W-1:0]  a_mant,
  output logic [EXP_W-1:0] e,
  output logic [SIDE_W-1:0] side_out
);
  localparam int unsigned SW = 2 * BIN_W + $clog2(M_HIST);   // 37 bits
  localparam int unsigned NS = NEWTON_STEPS + 1;

  // Stage 0: sum of squares.
  logic [SW-1:0] s_c, s_q;
  logic          v0;
  logic [SIDE_W-1:0] sd0;
  always_comb begin
    s_c = '0;
    for (int i = 0; i < M_HIST; i++) s_c += SW'(hist[i]) * SW'(hist[i]);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= '0; v0 <= 1'b0; sd0 <= '0;
    end else if (en) begin
      s_q <= s_c; v0 <= in_valid; sd0 <= side_in;
    end
  end

  // Stage 1: exponent, mantissa m (Q2.14) and seed.
  logic [EXP_W-1:0] e_c;
  logic [15:0]      m_c;
  logic [RM_W-1:0]  y_seed;
  always_comb begin
    e_c = '0;
    for (int b = 0; b < SW; b++) if (s_q[b]) e_c = EXP_W'(b / 2);
    if (2 * e_c <= 14) m_c = 16'(s_q << (14 - 2 * e_c));
    else               m_c = 16'(s_q >> (2 * e_c - 14));
    case (m_c[15:14])                       // 1/sqrt(1.5), 1/sqrt(2.5), 1/sqrt(3.5) in Q1.17
      2'b01:   y_seed = 18'd107020;
      2'b10:   y_seed = 18'd82897;
      2'b11:   y_seed = 18'd70061;
      default: y_seed = 18'd0;              // S = 0
    endcase
  end

  logic [RM_W-1:0]  y  [NS];
  logic [15:0]      mm [NS];
  logic [EXP_W-1:0] ee [NS];
  logic             vv [NS];
  logic [SIDE_W-1:0] sd [NS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y[0] <= '0; mm[0] <= '0; ee[0] <= '0; vv[0] <= 1'b0; sd[0] <= '0;
    end else if (en) begin
      y[0] <= y_seed; mm[0] <= m_c; ee[0] <= e_c; vv[0] <= v0; sd[0] <= sd0;
    end
  end

  // Newton steps.
  for (genvar s = 0; s < NEWTON_STEPS; s++) begin : g_newton
    logic [2*RM_W-1:0] ysq;      // Q2.34
    logic [RM_W:0]     ysq17;    // Q2.17
    logic [40:0]       my;       // Q4.31
    logic signed [21:0] t;       // 3 - m*y^2, Q.17
    logic [40:0]       yn;
    always_comb begin
      ysq   = y[s] * y[s];
      ysq17 = (RM_W+1)'(ysq >> 17);
      my    = 41'(mm[s]) * 41'(ysq17);
      t     = 22'sd393216 - $signed(22'(my >> 14));
      if (t < 0) t = '0;
      yn    = 41'(y[s]) * 41'(t);
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        y[s+1] <= '0; mm[s+1] <= '0; ee[s+1] <= '0; vv[s+1] <= 1'b0; sd[s+1] <= '0;
      end else if (en) begin
        y[s+1]  <= (yn >> 18) > 41'((1 << RM_W) - 1) ? '1 : RM_W'(yn >> 18);
        mm[s+1] <= mm[s];
        ee[s+1] <= ee[s];
        vv[s+1] <= vv[s];
        sd[s+1] <= sd[s];
      end
    end
  end

  // Output stage: a = y^2.
  logic [2*RM_W-1:0] yf_sq;
  assign yf_sq = y[NS-1] * y[NS-1];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; r_mant <= '0; a_mant <= '0; e <= '0; side_out <= '0;
    end else if (en) begin
      out_valid <= vv[NS-1];
      r_mant    <= y[NS-1];
      a_mant    <= RM_W'(yf_sq >> 17);
      e         <= ee[NS-1];
      side_out  <= sd[NS-1];
    end
  end
endmodule
