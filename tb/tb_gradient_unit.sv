// tb_gradient_unit: self-checking test of gradient_unit.
//
// A random 12 x 16 image is streamed column by column, with the enable dropped at random to
// exercise the stop signal. The expected magnitude (sqrt(dx^2 + dy^2) times the CORDIC gain)
// and orientation bin are computed with real arithmetic from the backward differences; the
// magnitude must match within 2, the bin exactly unless the angle lies within 0.5 degree of a
// bin edge. The latency with the enable held high must be CORDIC_STEPS + 3 clocks.
module tb_gradient_unit;
  import sfind_pkg::*;
  localparam int W = 12, H = 16;
  localparam real K = 1.6467599963756174;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  pix_t pix; coord_t x, y;
  logic out_valid; mag_t mag; bin_idx_t bin; coord_t ox, oy;
  int checks = 0, failures = 0;
  int img [W][H];
  real exp_mag [$]; real exp_ang [$]; int exp_x [$]; int exp_y [$];
  int cyc = 0, t_in = -1, t_out = -1;

  gradient_unit #(.MAX_HEIGHT(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(int xx, int yy);
    int dx = (xx == 0) ? 0 : img[xx][yy] - img[xx-1][yy];
    int dy = (yy == 0) ? 0 : img[xx][yy] - img[xx][yy-1];
    real a;
    if (dy < 0 || (dy == 0 && dx < 0)) begin dx = -dx; dy = -dy; end
    a = $atan2(real'(dy), real'(dx)) * 180.0 / PI;
    if (a >= 180.0) a -= 180.0;
    exp_mag.push_back(K * $sqrt(real'(dx*dx + dy*dy)));
    exp_ang.push_back(a);
    exp_x.push_back(xx); exp_y.push_back(yy);
  endtask

  // monitor
  always @(posedge clk) begin
    if (rst_n && en && out_valid) begin
      real em, ea, edge_d;
      int eb;
      em = exp_mag.pop_front(); ea = exp_ang.pop_front();
      eb = int'($floor(ea / 22.5));
      edge_d = ea - 22.5 * $floor(ea / 22.5);
      if (t_out < 0) t_out = cyc;
      checks++;
      if ((real'(mag) - em > 2.0 || em - real'(mag) > 2.0) || int'(ox) != exp_x.pop_front() || int'(oy) != exp_y.pop_front()) begin
        failures++; $display("mag mismatch got %0d exp %f", mag, em);
      end
      if (em > 4.0 && edge_d > 0.5 && edge_d < 22.0) begin
        checks++;
        if (int'(bin) != eb) begin failures++; $display("bin mismatch got %0d exp %0d (ang %f)", bin, eb, ea); end
      end
    end
  end

  initial begin
    for (int i = 0; i < W; i++) for (int j = 0; j < H; j++) img[i][j] = $urandom_range(0, 255);
    // a few columns with strong, known structure
    for (int j = 0; j < H; j++) begin img[3][j] = 255; img[4][j] = 0; img[5][j] = 16 * j; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < W; i++) begin
      for (int j = 0; j < H; j++) begin
        #1;
        en = (i < 2) ? 1'b1 : ($urandom_range(0, 3) != 0);
        in_valid = 1; pix = pix_t'(img[i][j]); x = coord_t'(i); y = coord_t'(j);
        @(posedge clk);
        while (!en) begin #1; en = ($urandom_range(0, 1) != 0); @(posedge clk); end
        if (t_in < 0) t_in = cyc;
        push(i, j);
      end
    end
    #1 in_valid = 0; en = 1;
    repeat (30) @(posedge clk);
    checks++;
    if (exp_mag.size() != 0) begin failures++; $display("missing outputs: %0d", exp_mag.size()); end
    checks++;
    if (t_out - t_in != 11 + 3) begin failures++; $display("latency %0d", t_out - t_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
