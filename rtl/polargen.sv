// Cartesian to polar conversion for dart scoring (iterative CORDIC).
//
// Converts a screen position (x, y relative to the bull, y pointing down)
// to a radius r = sqrt(x^2+y^2), rounded to the nearest pixel, and an angle
// theta = atan2(y, x) / pi in signed fixed point with seven fraction bits
// (1.0 = 128, so theta runs from -128 to +128). The original design used a
// vendor CORDIC core in this role; its insides are this design's own: the
// vector is first turned by +/-90 degrees into the right half plane, then
// ITER vectoring micro-rotations drive y to zero while an angle accumulator
// in units of pi/16384 collects the rotation. The CORDIC gain is removed
// with one constant multiply (0.60725 * 2^16 = 39797).
//
// Timing: start is a one-cycle pulse with x,y valid. rdy falls on start and
// rises ITER + 2 cycles later with r and theta valid; they hold until the
// next start.
module polargen #(
  parameter int unsigned ITER = 12
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic signed [9:0] x,
  input  logic signed [9:0] y,
  output logic        [9:0] r,
  output logic signed [9:0] theta,
  output logic              rdy
);
  localparam int FRAC = 4;   // extra fraction bits on x and y

  // atan(2^-i) / pi * 16384
  function automatic logic signed [17:0] atan_tab(input int i);
    case (i)
      0: return 18'sd4096;  1: return 18'sd2418;  2: return 18'sd1278;
      3: return 18'sd649;   4: return 18'sd326;   5: return 18'sd163;
      6: return 18'sd81;    7: return 18'sd41;    8: return 18'sd20;
      9: return 18'sd10;    10: return 18'sd5;    11: return 18'sd3;
      default: return 18'sd1;
    endcase
  endfunction

  logic signed [17:0] cx, cy, cz;
  logic [$clog2(ITER+1)-1:0] it;
  logic busy;

  logic signed [17:0] xs, ys;
  assign xs = 18'(x) <<< FRAC;
  assign ys = 18'(y) <<< FRAC;

  logic [31:0] mag;
  logic signed [17:0] z_round;  // only the low ten bits are kept (|theta| <= 128)
  assign mag     = 32'(cx) * 32'd39797 + (32'd1 << (15 + FRAC));
  assign z_round = (cz + 18'sd64) >>> 7;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      rdy   <= 1'b0;
      r     <= '0;
      theta <= '0;
      cx    <= '0;
      cy    <= '0;
      cz    <= '0;
      it    <= '0;
    end else if (start) begin
      busy <= 1'b1;
      rdy  <= 1'b0;
      it   <= '0;
      if (x >= 0) begin
        cx <= xs;  cy <= ys;  cz <= '0;
      end else if (y >= 0) begin      // turn by -90 degrees
        cx <= ys;  cy <= -xs; cz <= 18'sd8192;
      end else begin                  // turn by +90 degrees
        cx <= -ys; cy <= xs;  cz <= -18'sd8192;
      end
    end else if (busy) begin
      if (it == ($clog2(ITER+1))'(ITER)) begin
        busy  <= 1'b0;
        rdy   <= 1'b1;
        r     <= 10'(mag >> (16 + FRAC));
        theta <= 10'(z_round);
      end else begin
        if (cy >= 0) begin
          cx <= cx + (cy >>> it);
          cy <= cy - (cx >>> it);
          cz <= cz + atan_tab(int'(it));
        end else begin
          cx <= cx - (cy >>> it);
          cy <= cy + (cx >>> it);
          cz <= cz - atan_tab(int'(it));
        end
        it <= it + 1'b1;
      end
    end
  end
endmodule
