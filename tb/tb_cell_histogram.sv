// tb_cell_histogram: self-checking test of cell_histogram.
//
// Random (magnitude, bin) samples of a 12 x 14 pixel image are streamed column by column with
// a randomly dropped enable. The expected 4 x 4-cell histograms are summed directly from the
// samples; the two pixel rows below the last whole cell row must be ignored. Every finished
// cell is checked (bins and coordinates), in column-major order, and none may be missing or
// extra. The cell must leave one clock after its last sample.
module tb_cell_histogram;
  import sfind_pkg::*;
  localparam int W = 12, H = 14, CR = 3;

  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  mag_t mag; bin_idx_t bin; coord_t x, y;
  logic cell_valid; logic [D_BINS-1:0][BIN_W-1:0] cell_hist; coord_t cx, cy;
  int checks = 0, failures = 0, got = 0;
  int smag [W][H]; int sbin [W][H];
  int expq [$];
  int cyc = 0;
  bit directed = 0;

  cell_histogram #(.MAX_CELL_ROWS(CR)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && en && cell_valid && !directed) begin
      int c, r;
      c = expq.pop_front(); r = expq.pop_front();
      got++;
      checks++;
      if (int'(cx) != c || int'(cy) != r) begin failures++; $display("coord %0d,%0d exp %0d,%0d", cx, cy, c, r); end
      for (int b = 0; b < D_BINS; b++) begin
        int s;
        s = 0;
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
          if (sbin[4*c+i][4*r+j] == b) s += smag[4*c+i][4*r+j];
        checks++;
        if (int'(cell_hist[b]) != s) begin failures++; $display("cell %0d,%0d bin %0d got %0d exp %0d", c, r, b, cell_hist[b], s); end
      end
    end
  end

  initial begin
    for (int i = 0; i < W; i++) for (int j = 0; j < H; j++) begin
      smag[i][j] = $urandom_range(0, 1023); sbin[i][j] = $urandom_range(0, 7);
    end
    for (int c = 0; c < W/4; c++) for (int r = 0; r < CR; r++) begin expq.push_back(c); expq.push_back(r); end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < W; i++) for (int j = 0; j < H; j++) begin
      #1 en = ($urandom_range(0, 3) != 0);
      in_valid = 1; mag = mag_t'(smag[i][j]); bin = bin_idx_t'(sbin[i][j]);
      x = coord_t'(i); y = coord_t'(j);
      @(posedge clk);
      while (!en) begin #1 en = 1'b1; @(posedge clk); end
    end
    #1 in_valid = 0; en = 1;
    // latency: the last cell (x = 11, y = 11) must be on the output right after its sample
    repeat (5) @(posedge clk);
    checks++;
    if (got != (W/4) * CR) begin failures++; $display("got %0d cells", got); end
    // directed latency check
    directed = 1;
    #1 in_valid = 1; x = 3; y = 3; mag = 10; bin = 2;
    @(posedge clk); #1 in_valid = 0;
    checks++;
    if (!cell_valid) begin failures++; $display("cell not out one clock after its last sample"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
