// tb_block_former: self-checking test of block_former.
//
// A 4 x 5 grid of random cell histograms is streamed column by column with a randomly dropped
// enable and bubbles between cells. Every block of the 3 x 4 block grid must come out once, in
// column-major order, as H = (top-left, top-right, bottom-left, bottom-right) cell histograms,
// one clock after the cell that completes it.
module tb_block_former;
  import sfind_pkg::*;
  localparam int CW = 4, CH = 5;

  logic clk = 0, rst_n = 0, en = 1, cell_valid = 0;
  logic [D_BINS-1:0][BIN_W-1:0] cell_hist; coord_t cx, cy;
  logic blk_valid; logic [M_HIST-1:0][BIN_W-1:0] blk_hist; coord_t bx, by;
  int checks = 0, failures = 0, got = 0;
  int cells [CW][CH][D_BINS];
  int expq [$];
  bit directed = 0;

  block_former #(.MAX_CELL_ROWS(CH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && en && blk_valid && !directed) begin
      int c, r;
      c = expq.pop_front(); r = expq.pop_front();
      got++;
      checks++;
      if (int'(bx) != c || int'(by) != r) begin failures++; $display("coord %0d,%0d exp %0d,%0d", bx, by, c, r); end
      for (int i = 0; i < M_HIST; i++) begin
        int q, ccx, ccy;
        q = i / D_BINS;
        ccx = c + (q % 2); ccy = r + (q / 2);
        checks++;
        if (int'(blk_hist[i]) != cells[ccx][ccy][i % D_BINS]) begin
          failures++; $display("block %0d,%0d h%0d got %0d", c, r, i, blk_hist[i]);
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < CW; i++) for (int j = 0; j < CH; j++) for (int b = 0; b < D_BINS; b++)
      cells[i][j][b] = $urandom_range(0, 65535);
    for (int i = 0; i < CW - 1; i++) for (int j = 0; j < CH - 1; j++) begin expq.push_back(i); expq.push_back(j); end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < CW; i++) for (int j = 0; j < CH; j++) begin
      #1 en = ($urandom_range(0, 3) != 0);
      cell_valid = 1; cx = coord_t'(i); cy = coord_t'(j);
      for (int b = 0; b < D_BINS; b++) cell_hist[b] = BIN_W'(cells[i][j][b]);
      @(posedge clk);
      while (!en) begin #1 en = 1'b1; @(posedge clk); end
      #1 cell_valid = 0;
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    #1 cell_valid = 0; en = 1;
    repeat (5) @(posedge clk);
    checks++;
    if (got != (CW - 1) * (CH - 1)) begin failures++; $display("got %0d blocks", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
