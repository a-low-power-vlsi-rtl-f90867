// tb_hog_feature: self-checking test of hog_feature.
//
// Random histogram elements and normalisation coefficients (as produced for real blocks: the
// element never exceeds sqrt of the block's sum of squares) are fed four lanes at a time. The
// Q0.16 output must be within 1 LSB of h * sqrt(a) computed in real arithmetic, one clock later.
module tb_hog_feature;
  import sfind_pkg::*;
  localparam int L = 4, N = 500;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [L-1:0][BIN_W-1:0] h; logic [RM_W-1:0] r_mant; logic [EXP_W-1:0] e;
  logic out_valid; logic [L-1:0][FEAT_W-1:0] feat;
  int checks = 0, failures = 0;

  hog_feature #(.LANES(L)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      real s, r, ex [L];
      #1;
      // a block whose sum of squares has the decoded form r_mant * 2^-17 * 2^-e
      e = EXP_W'($urandom_range(0, 15));
      r_mant = RM_W'($urandom_range(65537, 131072));
      r = real'(r_mant) / 131072.0 / (2.0 ** e);
      for (int l = 0; l < L; l++) begin
        real hmax;
        hmax = 1.0 / r;
        if (hmax > 65535.0) hmax = 65535.0;
        h[l] = BIN_W'($urandom_range(0, int'(hmax)));
        ex[l] = real'(h[l]) * r * 65536.0;
        if (ex[l] > 65535.0) ex[l] = 65535.0;
      end
      in_valid = 1;
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid) begin failures++; $display("no output after one clock"); end
      for (int l = 0; l < L; l++) begin
        checks++;
        if (real'(feat[l]) > ex[l] + 1.0 || real'(feat[l]) < ex[l] - 1.0) begin
          failures++; $display("lane %0d got %0d exp %f", l, feat[l], ex[l]);
        end
      end
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
