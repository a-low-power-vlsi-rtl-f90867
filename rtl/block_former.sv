// block_former: forms the 2 x 2-cell blocks and their 32-element histogram vector H.
//
// Cells arrive column by column. A buffer of one cell column keeps the histograms of the cell
// column to the left, and one register keeps the cell just above in the current column. When
// cell (cx, cy) arrives with cx >= 1 and cy >= 1, block (cx-1, cy-1) is complete and leaves as
// H = (Cell0, Cell1, Cell2, Cell3) with Cell0 top-left, Cell1 top-right, Cell2 bottom-left and
// Cell3 bottom-right, each cell's D bins in order; this cell order is the one of the document's
// figure of HOG extraction. Blocks overlap by one cell in each direction (stride of one cell,
// i.e. 4 pixels, the window shift the document uses), so the block grid is one smaller than
// the cell grid and the blocks leave in column-major order.
//
// Timing: one cell per clock at most; the block leaves one clock after its last cell. Advances
// only when en is high.
module block_former
  import sfind_pkg::*;
#(
  parameter int unsigned MAX_CELL_ROWS = MAX_H / P_CELL
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   cell_valid,
  input  logic [D_BINS-1:0][BIN_W-1:0] cell_hist,
  input  coord_t cx,
  input  coord_t cy,
  output logic   blk_valid,
  output logic [M_HIST-1:0][BIN_W-1:0] blk_hist,   // element i is h_(i+1)
  output coord_t bx,
  output coord_t by
);
  logic [D_BINS-1:0][BIN_W-1:0] left_col [MAX_CELL_ROWS];
  localparam int unsigned RW = $clog2(MAX_CELL_ROWS);
  logic [D_BINS-1:0][BIN_W-1:0] left_cur, left_prev, up_cur;

  assign left_cur = left_col[cy[RW-1:0]];

  always_ff @(posedge clk) begin
    if (en && cell_valid) left_col[cy[RW-1:0]] <= cell_hist;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left_prev <= '0;
      up_cur    <= '0;
      blk_valid <= 1'b0;
      blk_hist  <= '0;
      bx <= '0;
      by <= '0;
    end else if (en) begin
      blk_valid <= cell_valid && (cx != '0) && (cy != '0);
      if (cell_valid) begin
        left_prev <= left_cur;
        up_cur    <= cell_hist;
        blk_hist  <= {cell_hist, left_cur, up_cur, left_prev};   // Cell3..Cell0, MSB first
        bx        <= cx - 1'b1;
        by        <= cy - 1'b1;
      end
    end
  end
endmodule
