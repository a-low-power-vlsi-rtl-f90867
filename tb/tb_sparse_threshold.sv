// tb_sparse_threshold: self-checking test of sparse_threshold.
//
// Random blocks (some with many equal elements, and some with all elements equal, so that
// elements sit exactly on the threshold)
// go through the unit back to back. For each, th = k * mean(H) is computed in real arithmetic
// with k = 1.0 and every element's selection bit must equal (h_i > th). The histogram and
// coordinates must pass through unchanged, one clock later.
module tb_sparse_threshold;
  import sfind_pkg::*;
  localparam int NB = 200;

  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  logic [M_HIST-1:0][BIN_W-1:0] hist; coord_t bx, by;
  logic out_valid; logic [M_HIST-1:0][BIN_W-1:0] out_hist; logic [M_HIST-1:0] sel;
  coord_t obx, oby;
  int checks = 0, failures = 0;
  logic [M_HIST-1:0][BIN_W-1:0] hq [$];

  sparse_threshold #(.K_X2(2)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [M_HIST-1:0][BIN_W-1:0] h;
      real th;
      h = hq.pop_front();
      th = 0.0;
      for (int i = 0; i < M_HIST; i++) th += real'(h[i]);
      th = 1.0 * th / real'(M_HIST);
      checks++;
      if (out_hist != h || int'(obx) != int'(h[0] % 2048) || int'(oby) != int'(h[1] % 2048)) begin
        failures++; $display("pass-through mismatch");
      end
      for (int i = 0; i < M_HIST; i++) begin
        checks++;
        if (sel[i] != (real'(h[i]) > th)) begin failures++; $display("sel %0d got %0b, h=%0d th=%f", i, sel[i], h[i], th); end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NB; n++) begin
      #1 in_valid = 1;
      for (int i = 0; i < M_HIST; i++) begin
        case (n % 4)
          0: hist[i] = BIN_W'($urandom_range(0, 65535));
          1: hist[i] = BIN_W'($urandom_range(0, 3) * 100);      // ties with the mean
          3: hist[i] = BIN_W'(100 + n);                          // every element equals the mean
          default: hist[i] = (i == n % M_HIST) ? BIN_W'(5000) : BIN_W'($urandom_range(0, 20));
        endcase
      end
      bx = coord_t'(hist[0] % 2048); by = coord_t'(hist[1] % 2048);
      hq.push_back(hist);
      @(posedge clk);
    end
    #1 in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (hq.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
