// tb_normalize_coef: self-checking test of normalize_coef.
//
// Random blocks over a wide range of magnitudes (single elements, small values, full-scale
// values) and one all-zero block pass through the unit back to back. The decoded outputs
// sqrt(a) = r_mant * 2^-17 * 2^-e and a = a_mant * 2^-17 * 4^-e are compared with
// 1/sqrt(sum h^2) and 1/sum h^2 computed in real arithmetic (relative error below 1e-4); the
// side vector must travel with its block, and the latency is NEWTON_STEPS + 3 clocks.
module tb_normalize_coef;
  import sfind_pkg::*;
  localparam int NB = 300;

  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  logic [M_HIST-1:0][BIN_W-1:0] hist; logic [15:0] side_in;
  logic out_valid; logic [RM_W-1:0] r_mant, a_mant; logic [EXP_W-1:0] e; logic [15:0] side_out;
  int checks = 0, failures = 0, cyc = 0, t_in = -1, t_out = -1;
  real sq [$];
  int sidq [$];

  normalize_coef #(.NEWTON_STEPS(4), .SIDE_W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real relerr(real a, real b);
    real d = a - b;
    if (d < 0) d = -d;
    return (b == 0.0) ? d : d / b;
  endfunction

  always @(posedge clk) begin
    if (rst_n && en && out_valid) begin
      real s, r, a;
      if (t_out < 0) t_out = cyc;
      s = sq.pop_front();
      r = real'(r_mant) / 131072.0 / (2.0 ** e);
      a = real'(a_mant) / 131072.0 / (4.0 ** e);
      checks++;
      if (int'(side_out) != sidq.pop_front()) begin failures++; $display("side mismatch"); end
      checks++;
      if (s == 0.0) begin
        if (r_mant != 0 || a_mant != 0) begin failures++; $display("zero block not zero"); end
      end else if (relerr(r, 1.0 / $sqrt(s)) > 1e-4 || relerr(a, 1.0 / s) > 1e-4) begin
        failures++; $display("S=%f r=%e exp %e a=%e exp %e", s, r, 1.0/$sqrt(s), a, 1.0/s);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NB; n++) begin
      real s;
      #1 in_valid = 1;
      s = 0.0;
      for (int i = 0; i < M_HIST; i++) begin
        case (n % 4)
          0: hist[i] = BIN_W'($urandom_range(0, 65535));
          1: hist[i] = BIN_W'($urandom_range(0, 3));
          2: hist[i] = (i == n % M_HIST) ? BIN_W'($urandom_range(1, 65535)) : '0;
          default: hist[i] = (n == 3) ? '0 : BIN_W'($urandom_range(0, 1) ? 65535 : $urandom_range(0, 9000));
        endcase
        s += real'(hist[i]) * real'(hist[i]);
      end
      side_in = 16'(n * 7);
      sq.push_back(s); sidq.push_back(n * 7);
      @(posedge clk);
      if (t_in < 0) t_in = cyc;
    end
    #1 in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (sq.size() != 0) begin failures++; $display("missing outputs"); end
    checks++;
    if (t_out - t_in != 4 + 3) begin failures++; $display("latency %0d", t_out - t_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
