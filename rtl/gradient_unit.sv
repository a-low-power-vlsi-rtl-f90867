// gradient_unit: luminance gradient, its magnitude and its orientation bin, one pixel per clock.
//
// Pixels arrive column by column (top to bottom inside a column, columns left to right), which
// is the order in which the rest of the core walks the block grid. The horizontal difference
// dx = I(x,y) - I(x-1,y) uses a one-column line buffer, the vertical difference
// dy = I(x,y) - I(x,y-1) uses the previous pixel; differences that would reach outside the
// image are zero. The document gives the use of CORDIC with 11 steps for the arctangent and the
// square root; the difference kernel, the unsigned 0..180 degree orientation and the fixed-point
// widths are this design's choice.
//
// CORDIC (vectoring mode): the vector is folded into the upper half plane (unsigned
// orientation), rotated by -90 degrees when it lies in the second quadrant, and then driven to
// the x axis in CORDIC_STEPS micro-rotations with 8 fractional bits (fewer bits let the
// truncated shifts bias the magnitude by up to 0.8). The final x, rounded to an integer, is the magnitude times the
// CORDIC gain K = 1.6468 (left uncorrected: every feature is normalised per block later), the accumulated
// angle is in units of 180/4096 degrees and its top three bits are the bin (22.5 degrees each).
//
// Timing: fully pipelined, CORDIC_STEPS + 3 register stages. Every register advances only when
// en is high, so the whole stage freezes under the core's stop signal.
module gradient_unit
  import sfind_pkg::*;
#(
  parameter int unsigned CORDIC_STEPS = 11,
  parameter int unsigned MAX_HEIGHT   = MAX_H
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  logic     in_valid,
  input  pix_t     pix,
  input  coord_t   x,
  input  coord_t   y,
  output logic     out_valid,
  output mag_t     mag,
  output bin_idx_t bin,
  output coord_t   ox,
  output coord_t   oy
);
  localparam int unsigned FRAC = 8;      // fractional bits kept inside the CORDIC
  localparam int unsigned CW   = 20;     // signed datapath width
  localparam int unsigned ZW   = 14;     // signed angle width, 4096 = 180 degrees
  localparam int unsigned NST  = CORDIC_STEPS + 1;

  // atan(2^-i) in units of 180/4096 degrees: round(atan(2^-i) * 4096 / pi).
  function automatic logic signed [ZW-1:0] atan_tab(int unsigned i);
    case (i)
      0: return 14'sd1024;  1: return 14'sd605;  2: return 14'sd319;  3: return 14'sd162;
      4: return 14'sd81;    5: return 14'sd41;   6: return 14'sd20;   7: return 14'sd10;
      8: return 14'sd5;     9: return 14'sd3;   10: return 14'sd1;
      default: return 14'sd0;
    endcase
  endfunction

  // ---------------- difference stage ----------------
  pix_t colbuf [MAX_HEIGHT];
  pix_t prev_pix;
  logic signed [PIX_W:0] dx_q, dy_q;
  logic   d_valid;
  coord_t d_x, d_y;

  always_ff @(posedge clk) begin
    if (en && in_valid) begin
      colbuf[y] <= pix;
      prev_pix  <= pix;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid <= 1'b0;
      dx_q <= '0; dy_q <= '0; d_x <= '0; d_y <= '0;
    end else if (en) begin
      d_valid <= in_valid;
      d_x     <= x;
      d_y     <= y;
      dx_q    <= (x == '0) ? '0 : $signed({1'b0, pix}) - $signed({1'b0, colbuf[y]});
      dy_q    <= (y == '0) ? '0 : $signed({1'b0, pix}) - $signed({1'b0, prev_pix});
    end
  end

  // ---------------- CORDIC ----------------
  logic signed [CW-1:0] cx [NST];
  logic signed [CW-1:0] cy [NST];
  logic signed [ZW-1:0] cz [NST];
  logic                 cv [NST];
  coord_t               cpx [NST];
  coord_t               cpy [NST];

  // Stage 0: fold into 0 <= angle < 180 degrees and pre-rotate the second quadrant.
  logic signed [CW-1:0] fx, fy;
  always_comb begin
    fx = CW'(dx_q) <<< FRAC;
    fy = CW'(dy_q) <<< FRAC;
    if (dy_q < 0 || (dy_q == 0 && dx_q < 0)) begin
      fx = -fx;
      fy = -fy;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cx[0] <= '0; cy[0] <= '0; cz[0] <= '0; cv[0] <= 1'b0; cpx[0] <= '0; cpy[0] <= '0;
    end else if (en) begin
      cv[0]  <= d_valid;
      cpx[0] <= d_x;
      cpy[0] <= d_y;
      if (fx < 0) begin
        cx[0] <= fy;
        cy[0] <= -fx;
        cz[0] <= 14'sd2048;
      end else begin
        cx[0] <= fx;
        cy[0] <= fy;
        cz[0] <= '0;
      end
    end
  end

  for (genvar i = 0; i < CORDIC_STEPS; i++) begin : g_step
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cx[i+1] <= '0; cy[i+1] <= '0; cz[i+1] <= '0; cv[i+1] <= 1'b0;
        cpx[i+1] <= '0; cpy[i+1] <= '0;
      end else if (en) begin
        cv[i+1]  <= cv[i];
        cpx[i+1] <= cpx[i];
        cpy[i+1] <= cpy[i];
        if (cy[i] > 0) begin
          cx[i+1] <= cx[i] + (cy[i] >>> i);
          cy[i+1] <= cy[i] - (cx[i] >>> i);
          cz[i+1] <= cz[i] + atan_tab(i);
        end else begin
          cx[i+1] <= cx[i] - (cy[i] >>> i);
          cy[i+1] <= cy[i] + (cx[i] >>> i);
          cz[i+1] <= cz[i] - atan_tab(i);
        end
      end
    end
  end

  // Output stage: magnitude and bin.
  logic signed [ZW-1:0] zf;
  logic [11:0]          zc;
  always_comb begin
    zf = cz[NST-1];
    if (zf < 0)               zc = '0;
    else if (zf > 14'sd4095)  zc = 12'd4095;
    else                      zc = zf[11:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; mag <= '0; bin <= '0; ox <= '0; oy <= '0;
    end else if (en) begin
      out_valid <= cv[NST-1];
      mag       <= MAG_W'((cx[NST-1] + CW'(1 << (FRAC - 1))) >>> FRAC);   // rounded
      bin       <= zc[11:9];
      ox        <= cpx[NST-1];
      oy        <= cpy[NST-1];
    end
  end
endmodule
