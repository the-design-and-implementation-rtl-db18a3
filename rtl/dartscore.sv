// Score of one dart from its screen position.
//
// The position (pixels from the bull, y down, one pixel per millimetre) is
// turned into polar form by polargen. The radius picks the ring: double
// bull (r <= 7, 50 points, counts as a double), bull (r <= 16, 25), treble
// (99..107), double (162..170), single elsewhere, and off the board beyond
// 170. The angle picks one of twenty 18-degree sectors, centred on
// multiples of 0.1 pi with 6 on the +x axis; positive angles are the lower
// half of the screen (6, 10, 15, 2, 17, 3, 19, 7, 16, 8, 11) and negative
// ones the upper half (6, 13, 4, 18, 1, 20, 5, 12, 9, 14, 11). The ring
// radii, sector order and the two-digit ASCII result (zero-padded to eight
// bytes, or "NO SCORE") follow the original design. The sector is found
// here with one multiply, k = (10*|theta| + 64) / 128, rather than a chain
// of rounded boundary constants, and an off-board dart clears the double
// flag.
//
// Timing: a one-cycle ce pulse recomputes; rdy falls on the next edge and
// rises again ITER + 3 cycles after ce, together with the new score and
// double_hit.
module dartscore (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       ce,
  input  logic signed [9:0]          x,
  input  logic signed [9:0]          y,
  output dartboard_pkg::str8_t       score,
  output logic                       double_hit,
  output logic                       rdy
);
  import dartboard_pkg::*;

  logic [9:0]        r;
  logic signed [9:0] theta;
  logic              p_rdy, p_rdy_q;

  polargen u_polar (
    .clk, .rst, .start(ce), .x, .y, .r, .theta, .rdy(p_rdy)
  );

  logic [9:0]  a;
  logic [13:0] k_full;
  logic [3:0]  k;
  logic [4:0]  base;
  logic [6:0]  pts;
  logic        dbl_ring, trip_ring;
  always_comb begin
    a         = (theta < 0) ? 10'(-theta) : 10'(theta);
    k_full    = (14'(a) * 14'd10 + 14'd64) >> 7;
    k         = (k_full > 14'd10) ? 4'd10 : 4'(k_full);
    base      = sector_value(theta > 0, k);
    trip_ring = (r >= 10'(R_TRIP_IN)) && (r <= 10'(R_TRIP_OUT));
    dbl_ring  = (r >= 10'(R_DBL_IN))  && (r <= 10'(R_DBL_OUT));
    pts       = trip_ring ? 7'(base) * 7'd3 : dbl_ring ? 7'(base) * 7'd2 : 7'(base);
  end

  always_ff @(posedge clk) begin
    p_rdy_q <= p_rdy;
    if (rst) begin
      score      <= NO_SCORE;
      double_hit <= 1'b0;
      rdy        <= 1'b0;
      p_rdy_q    <= 1'b0;
    end else begin
      if (ce) rdy <= 1'b0;
      else if (p_rdy && !p_rdy_q) rdy <= 1'b1;
      if (p_rdy && !p_rdy_q) begin
        if (r > 10'(R_DBL_OUT)) begin
          score      <= NO_SCORE;
          double_hit <= 1'b0;
        end else if (r <= 10'(R_DBULL)) begin
          score      <= {48'h0, "50"};
          double_hit <= 1'b1;
        end else if (r <= 10'(R_BULL)) begin
          score      <= {48'h0, "25"};
          double_hit <= 1'b0;
        end else begin
          score      <= {48'h0, two_digits(pts)};
          double_hit <= dbl_ring;
        end
      end
    end
  end
endmodule
