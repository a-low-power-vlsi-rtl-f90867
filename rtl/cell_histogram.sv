// cell_histogram: orientation histogram of each P_CELL x P_CELL pixel cell.
//
// Each gradient sample adds its magnitude to the bin of its orientation (the document's
// d = 8-direction histogram of a p x p = 4 x 4 cell). Samples arrive column by column, so the
// 4 x 4 pixels of one cell are spread over four pixel columns. One accumulator entry per cell
// row holds the running histogram of the cell that is being collected in the current cell
// column: the first sample of a cell (x mod 4 = 0, y mod 4 = 0) overwrites the entry, the other
// fifteen add to it, and the last one (x mod 4 = 3, y mod 4 = 3) sends the finished histogram
// out together with the cell coordinates. Rows below the last whole cell are ignored. Hard
// binning (no interpolation between bins or cells) is this design's choice.
//
// Timing: one sample per clock; the finished cell leaves one clock after its last sample.
// Everything advances only when en is high.
module cell_histogram
  import sfind_pkg::*;
#(
  parameter int unsigned MAX_CELL_ROWS = MAX_H / P_CELL
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  logic     in_valid,
  input  mag_t     mag,
  input  bin_idx_t bin,
  input  coord_t   x,
  input  coord_t   y,
  output logic     cell_valid,
  output logic [D_BINS-1:0][BIN_W-1:0] cell_hist,
  output coord_t   cx,
  output coord_t   cy
);
  localparam int unsigned PL = $clog2(P_CELL);
  localparam int unsigned RW = $clog2(MAX_CELL_ROWS);

  logic [D_BINS-1:0][BIN_W-1:0] acc [MAX_CELL_ROWS];
  logic [D_BINS-1:0][BIN_W-1:0] nxt;
  coord_t row;
  logic   first, last, in_range;

  always_comb begin
    row      = y >> PL;
    in_range = row < coord_t'(MAX_CELL_ROWS);
    first    = (x[PL-1:0] == '0) && (y[PL-1:0] == '0);
    last     = (x[PL-1:0] == PL'(P_CELL - 1)) && (y[PL-1:0] == PL'(P_CELL - 1));
    nxt      = (first || !in_range) ? '0 : acc[row[RW-1:0]];
    nxt[bin] = nxt[bin] + BIN_W'(mag);
  end

  always_ff @(posedge clk) begin
    if (en && in_valid && in_range) acc[row[RW-1:0]] <= nxt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cell_valid <= 1'b0;
      cell_hist  <= '0;
      cx <= '0;
      cy <= '0;
    end else if (en) begin
      cell_valid <= in_valid && in_range && last;
      cell_hist  <= nxt;
      cx         <= x >> PL;
      cy         <= row;
    end
  end
endmodule
