// svm_coef_ram: banked SVM coefficient memory.
//
// A word holds one coefficient for each of the WIN_BLKS = 75 block positions of a detection
// window (position p = 5-column core c and row j: p = c*15 + j), so that one read serves all
// 75 MAC modules at once. Feature k of a block (a HOG element, or the k-th histogram pair of
// Sparse FIND in lexicographic order) is stored in bank k mod BANKS at address k / BANKS.
// This round-robin spread is the one the document draws for its example of five RAM blocks;
// the number of banks is a parameter. Each bank does one read per clock.
//
// Write port: one coefficient at a time (wr_pos, wr_idx). Read port: per bank an address and an
// enable; the word appears on rd_data one clock later.
module svm_coef_ram
  import sfind_pkg::*;
#(
  parameter int unsigned N_FEAT = M_HIST,
  parameter int unsigned BANKS  = 4,
  localparam int unsigned DEPTH = (N_FEAT + BANKS - 1) / BANKS,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic clk,
  input  logic wr_en,
  input  logic [6:0] wr_pos,
  input  logic [9:0] wr_idx,
  input  coef_t wr_data,
  input  logic [BANKS-1:0] rd_en,
  input  logic [BANKS-1:0][AW-1:0] rd_addr,
  output logic [BANKS-1:0][WIN_BLKS-1:0][COEF_W-1:0] rd_data
);
  logic [WIN_BLKS-1:0][COEF_W-1:0] mem [BANKS][DEPTH];

  localparam int unsigned BKW = (BANKS > 1) ? $clog2(BANKS) : 1;
  logic [BKW-1:0] wb;
  logic [AW-1:0]  wa;
  assign wb = BKW'(wr_idx % 10'(BANKS));
  assign wa = AW'(wr_idx / 10'(BANKS));

  always_ff @(posedge clk) begin
    if (wr_en && wr_idx < 10'(N_FEAT) && wr_pos < 7'(WIN_BLKS))
      mem[wb][wa][wr_pos] <= wr_data;
  end

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    always_ff @(posedge clk) begin
      if (rd_en[b]) rd_data[b] <= mem[b][rd_addr[b]];
    end
  end
endmodule
