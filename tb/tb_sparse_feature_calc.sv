// tb_sparse_feature_calc: self-checking test of sparse_feature_calc (16 coefficient banks).
//
// Random block pairs with selection masks of varying density (empty, sparse, dense, full, and
// pairs without block B) are loaded one after the other. For each pair:
//   - every needed (block, pair) feature is delivered exactly once, and no other;
//   - the lane of bank n carries pair k = address * 16 + n, the address issued the clock before;
//   - the feature is within 1 LSB of a * h_i * h_j computed in real arithmetic;
//   - the number of access clocks is max over banks of (accesses of A + accesses of B),
//     the block-parallel rule, and done follows the last lanes by one clock.
// The test also counts how often this beats processing the blocks one after the other.
module tb_sparse_feature_calc;
  import sfind_pkg::*;
  localparam int NB = 16, DEP = (N_PAIRS + NB - 1) / NB, AW = $clog2(DEP), NT = 120;

  logic clk = 0, rst_n = 0, load = 0;
  logic [M_HIST-1:0][BIN_W-1:0] hist_a, hist_b;
  logic [M_HIST-1:0] sel_a, sel_b;
  logic [RM_W-1:0] a_mant_a, a_mant_b; logic [EXP_W-1:0] e_a, e_b; logic b_valid;
  logic busy; logic [NB-1:0] rd_en; logic [NB-1:0][AW-1:0] rd_addr;
  logic [NB-1:0] lane_valid, lane_grp; logic [NB-1:0][FEAT_W-1:0] lane_feat;
  logic done; logic [AW+1:0] cycles;

  int checks = 0, failures = 0, wins = 0, ties = 0;
  logic [NB-1:0][AW-1:0] prev_addr;
  int seen [2][N_PAIRS];

  sparse_feature_calc #(.N_BANKS(NB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) prev_addr <= rd_addr;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real feat_ref(bit g, int k);
    real a, hi, hj;
    int i = int'(pair_i(k)), j = int'(pair_j(k));
    a  = g ? real'(a_mant_b) / 131072.0 / (4.0 ** e_b) : real'(a_mant_a) / 131072.0 / (4.0 ** e_a);
    hi = g ? real'(hist_b[i]) : real'(hist_a[i]);
    hj = g ? real'(hist_b[j]) : real'(hist_a[j]);
    return a * hi * hj * 65536.0;
  endfunction

  // lane monitor
  always @(posedge clk) begin
    if (rst_n) for (int n = 0; n < NB; n++) if (lane_valid[n]) begin
      int k; real ex;
      k = int'(prev_addr[n]) * NB + n;
      checks++;
      if (k >= N_PAIRS) begin failures++; $display("bad pair %0d", k); end
      else begin
        seen[lane_grp[n]][k]++;
        ex = feat_ref(lane_grp[n], k);
        if (real'(lane_feat[n]) > ex + 1.0 || real'(lane_feat[n]) < ex - 1.0) begin
          failures++; $display("feature k=%0d g=%0d got %0d exp %f", k, lane_grp[n], lane_feat[n], ex);
        end
      end
    end
  end

  task automatic random_block(output logic [M_HIST-1:0][BIN_W-1:0] h, output logic [M_HIST-1:0] s,
                              output logic [RM_W-1:0] am, output logic [EXP_W-1:0] e, input int dens);
    real sum;
    sum = 0.0;
    for (int i = 0; i < M_HIST; i++) begin
      h[i] = BIN_W'($urandom_range(0, 20000));
      s[i] = ($urandom_range(0, 99) < dens);
      sum += real'(h[i]) * real'(h[i]);
    end
    // a consistent with the histogram: a = 1 / sum, as a_mant * 2^-17 * 4^-e
    e = '0;
    while (sum / (4.0 ** e) >= 4.0) e++;
    am = RM_W'(int'(131072.0 * (4.0 ** e) / sum));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < NT; t++) begin
      int dens_a, dens_b, cA [NB], cB [NB], exp_cyc, seq_cyc, mA, mB, got_cyc, tl;
      dens_a = (t % 6 == 0) ? 0 : (t % 6 == 1) ? 100 : $urandom_range(5, 60);
      dens_b = (t % 5 == 0) ? 100 : $urandom_range(0, 60);
      random_block(hist_a, sel_a, a_mant_a, e_a, dens_a);
      random_block(hist_b, sel_b, a_mant_b, e_b, dens_b);
      b_valid = (t % 7 != 3);
      for (int n = 0; n < NB; n++) begin cA[n] = 0; cB[n] = 0; end
      for (int k = 0; k < N_PAIRS; k++) begin
        seen[0][k] = 0; seen[1][k] = 0;
        if (sel_a[pair_i(k)] && sel_a[pair_j(k)]) cA[k % NB]++;
        if (b_valid && sel_b[pair_i(k)] && sel_b[pair_j(k)]) cB[k % NB]++;
      end
      exp_cyc = 0; mA = 0; mB = 0;
      for (int n = 0; n < NB; n++) begin
        if (cA[n] + cB[n] > exp_cyc) exp_cyc = cA[n] + cB[n];
        if (cA[n] > mA) mA = cA[n];
        if (cB[n] > mB) mB = cB[n];
      end
      seq_cyc = mA + mB;
      load = 1;
      @(posedge clk); #1 load = 0;
      tl = 0;
      while (!done) begin
        if (lane_valid != '0) tl = 0; else tl++;
        @(posedge clk); #1;
      end
      got_cyc = int'(cycles);
      checks++;
      if (got_cyc != exp_cyc) begin failures++; $display("pair %0d: %0d access clocks, expected %0d", t, got_cyc, exp_cyc); end
      checks++;
      if (exp_cyc > 0 && tl != 0) begin failures++; $display("done %0d clocks after the last lanes", tl); end
      if (exp_cyc < seq_cyc) wins++; else ties++;
      for (int k = 0; k < N_PAIRS; k++) begin
        checks++;
        if (seen[0][k] != int'(sel_a[pair_i(k)] && sel_a[pair_j(k)]) ||
            seen[1][k] != int'(b_valid && sel_b[pair_i(k)] && sel_b[pair_j(k)])) begin
          failures++; $display("pair %0d: feature %0d delivered %0d/%0d times", t, k, seen[0][k], seen[1][k]);
        end
      end
    end
    $display("block-parallel fewer clocks than one-after-the-other in %0d of %0d pairs", wins, wins + ties);
    checks++;
    if (wins == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
