// tb_svm_coef_ram: self-checking test of svm_coef_ram.
//
// All 496 x 75 Sparse FIND coefficients of a 16-bank memory are written one by one with
// random values, then every bank reads every address (each bank with its own address in the
// same clock). Word element p of bank n at address d must be the coefficient of pair
// k = d * 16 + n at position p, one clock after the read; a bank without rd_en keeps its output.
module tb_svm_coef_ram;
  import sfind_pkg::*;
  localparam int NF = N_PAIRS, NBK = 16, DEP = (NF + NBK - 1) / NBK, AW = $clog2(DEP);

  logic clk = 0, wr_en = 0;
  logic [6:0] wr_pos; logic [9:0] wr_idx; coef_t wr_data;
  logic [NBK-1:0] rd_en = '0; logic [NBK-1:0][AW-1:0] rd_addr;
  logic [NBK-1:0][WIN_BLKS-1:0][COEF_W-1:0] rd_data;
  int checks = 0, failures = 0;
  shortint ref_c [NF][WIN_BLKS];

  svm_coef_ram #(.N_FEAT(NF), .BANKS(NBK)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NF; k++) for (int p = 0; p < WIN_BLKS; p++) begin
      ref_c[k][p] = shortint'($urandom());
      #1 wr_en = 1; wr_idx = 10'(k); wr_pos = 7'(p); wr_data = ref_c[k][p];
      @(posedge clk);
    end
    #1 wr_en = 0;
    for (int d = 0; d < DEP; d++) begin
      #1;
      for (int n = 0; n < NBK; n++) begin rd_en[n] = 1'b1; rd_addr[n] = AW'((d + n) % DEP); end
      @(posedge clk);
      #1;
      for (int n = 0; n < NBK; n++) begin
        int k;
        k = ((d + n) % DEP) * NBK + n;
        if (k < NF) for (int p = 0; p < WIN_BLKS; p++) begin
          checks++;
          if ($signed(rd_data[n][p]) != ref_c[k][p]) begin
            failures++; $display("bank %0d pair %0d pos %0d", n, k, p);
          end
        end
      end
    end
    // hold: bank 0 not enabled keeps its last word
    rd_en = '0; rd_en[1] = 1'b1; rd_addr[0] = '0;
    begin
      logic [WIN_BLKS-1:0][COEF_W-1:0] keep;
      keep = rd_data[0];
      @(posedge clk); #1;
      checks++;
      if (rd_data[0] != keep) begin failures++; $display("bank 0 output changed without rd_en"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
