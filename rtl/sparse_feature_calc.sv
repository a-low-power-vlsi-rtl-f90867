// sparse_feature_calc: Sparse FIND feature calculation with block-parallel RAM access.
//
// The Sparse FIND features of a block are f(h_i, h_j) = a * h_i * h_j for every pair i < j of
// elements above the sparsification threshold (the set H_D). The coefficient of pair k lives in
// coefficient bank k mod N_BANKS, so each bank has to serve a data-dependent number of pairs.
// Two blocks A and B are loaded together (the document's block-parallel processing): the
// sparsifying logic marks, bank by bank, the pairs that block A needs and those block B needs,
// and every clock each bank issues one of them (A's first). A block pair therefore takes
// max over banks of (accesses of A + accesses of B) clocks, instead of the sum of the two
// per-block maxima when the blocks go one after the other.
//
// Per bank there is a selector (which two histogram elements of which block) and a feature
// extractor f = (h_i * h_j * a_mant) >> (1 + 2e), with a = a_mant * 2^-17 * 4^-e; since
// a * h_i * h_j <= 1/2, the Q0.16 result never overflows. Pair k is the k-th pair of the
// lexicographic order (0,1), (0,2), ..., (30,31). N_BANKS is not given by the document.
//
// Interface: load (with both blocks; b_valid = 0 when there is no block B) starts a pair while
// the unit is idle. Each clock of issue drives rd_en/rd_addr of the coefficient banks; one
// clock later the lanes carry valid, group (0 = A, 1 = B) and feature, aligned with the RAM
// output. done pulses in the clock after the last lanes; cycles holds the number of issue
// clocks of the last block pair.
module sparse_feature_calc
  import sfind_pkg::*;
#(
  parameter int unsigned N_BANKS = 16,
  localparam int unsigned DEPTH = (N_PAIRS + N_BANKS - 1) / N_BANKS,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic [M_HIST-1:0][BIN_W-1:0] hist_a,
  input  logic [M_HIST-1:0]            sel_a,
  input  logic [RM_W-1:0]              a_mant_a,
  input  logic [EXP_W-1:0]             e_a,
  input  logic                         b_valid,
  input  logic [M_HIST-1:0][BIN_W-1:0] hist_b,
  input  logic [M_HIST-1:0]            sel_b,
  input  logic [RM_W-1:0]              a_mant_b,
  input  logic [EXP_W-1:0]             e_b,
  output logic busy,
  output logic [N_BANKS-1:0] rd_en,
  output logic [N_BANKS-1:0][AW-1:0] rd_addr,
  output logic [N_BANKS-1:0] lane_valid,
  output logic [N_BANKS-1:0] lane_grp,
  output logic [N_BANKS-1:0][FEAT_W-1:0] lane_feat,
  output logic done,
  output logic [AW+1:0] cycles
);
  typedef logic [N_BANKS*DEPTH-1:0][4:0] idx_tab_t;

  function automatic idx_tab_t make_tab(bit second);
    idx_tab_t t;
    for (int unsigned k = 0; k < N_BANKS * DEPTH; k++) begin
      if (k < N_PAIRS) t[k] = 5'(second ? pair_j(k) : pair_i(k));
      else             t[k] = '0;
    end
    return t;
  endfunction

  localparam idx_tab_t PI_T = make_tab(1'b0);
  localparam idx_tab_t PJ_T = make_tab(1'b1);

  logic [M_HIST-1:0][BIN_W-1:0] ha, hb;
  logic [RM_W-1:0]  ama, amb;
  logic [EXP_W-1:0] ea, eb;
  logic [N_BANKS-1:0][DEPTH-1:0] pend_a, pend_b;
  logic last_issue;

  // Sparsifying: which pairs each block needs, bank by bank.
  function automatic logic [N_BANKS-1:0][DEPTH-1:0] need(logic [M_HIST-1:0] s);
    logic [N_BANKS-1:0][DEPTH-1:0] r;
    for (int unsigned n = 0; n < N_BANKS; n++)
      for (int unsigned d = 0; d < DEPTH; d++) begin
        int unsigned k = d * N_BANKS + n;
        r[n][d] = (k < N_PAIRS) && s[PI_T[k]] && s[PJ_T[k]];
      end
    return r;
  endfunction

  // Issue: per bank, lowest pending pair of A, else of B.
  logic [N_BANKS-1:0]            iss, iss_b;
  logic [N_BANKS-1:0][AW-1:0]    iss_addr;
  logic [N_BANKS-1:0][DEPTH-1:0] clr_a, clr_b;
  logic [N_BANKS-1:0][FEAT_W-1:0] f_c;
  always_comb begin
    clr_a = '0; clr_b = '0;
    for (int n = 0; n < N_BANKS; n++) begin
      iss[n] = 1'b0; iss_b[n] = 1'b0; iss_addr[n] = '0;
      for (int d = DEPTH - 1; d >= 0; d--)
        if (pend_b[n][d]) begin iss[n] = 1'b1; iss_b[n] = 1'b1; iss_addr[n] = AW'(d); end
      for (int d = DEPTH - 1; d >= 0; d--)
        if (pend_a[n][d]) begin iss[n] = 1'b1; iss_b[n] = 1'b0; iss_addr[n] = AW'(d); end
      if (iss[n] && !iss_b[n]) clr_a[n][iss_addr[n]] = 1'b1;
      if (iss[n] &&  iss_b[n]) clr_b[n][iss_addr[n]] = 1'b1;
    end
    // Selector and feature extractor of each bank.
    for (int n = 0; n < N_BANKS; n++) begin
      int unsigned k;
      logic [BIN_W-1:0] hi, hj;
      logic [RM_W-1:0]  am;
      logic [EXP_W-1:0] ex;
      logic [2*BIN_W+RM_W-1:0] p;
      k  = int'(iss_addr[n]) * N_BANKS + n;
      hi = iss_b[n] ? hb[PI_T[k]] : ha[PI_T[k]];
      hj = iss_b[n] ? hb[PJ_T[k]] : ha[PJ_T[k]];
      am = iss_b[n] ? amb : ama;
      ex = iss_b[n] ? eb  : ea;
      p  = (2*BIN_W+RM_W)'(hi) * (2*BIN_W+RM_W)'(hj) * (2*BIN_W+RM_W)'(am);
      p  = p >> (1 + 2 * ex);
      f_c[n] = (p > (2*BIN_W+RM_W)'(16'hFFFF)) ? 16'hFFFF : FEAT_W'(p);
    end
  end

  assign busy    = |{pend_a, pend_b} || last_issue;
  assign rd_en   = iss;
  assign rd_addr = iss_addr;

  always_ff @(posedge clk) begin
    if (load && !busy) begin
      ha <= hist_a; ama <= a_mant_a; ea <= e_a;
      hb <= hist_b; amb <= a_mant_b; eb <= e_b;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_a <= '0; pend_b <= '0;
      lane_valid <= '0; lane_grp <= '0; lane_feat <= '0;
      last_issue <= 1'b0; done <= 1'b0; cycles <= '0;
    end else begin
      lane_valid <= iss;
      lane_grp   <= iss_b;
      lane_feat  <= f_c;
      done       <= 1'b0;
      last_issue <= 1'b0;
      if (load && !busy) begin
        pend_a     <= need(sel_a);
        pend_b     <= b_valid ? need(sel_b) : '0;
        cycles     <= '0;
        last_issue <= 1'b1;          // one settling clock so an empty pair also reports done
      end else if (|{pend_a, pend_b}) begin
        pend_a     <= pend_a & ~clr_a;
        pend_b     <= pend_b & ~clr_b;
        cycles     <= cycles + 1'b1;
        last_issue <= 1'b1;
      end else if (last_issue) begin
        done <= 1'b1;
      end
    end
  end
endmodule
