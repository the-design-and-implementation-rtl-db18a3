// Shared types and constants of the automated dartboard.
//
// Coordinates: the detection side works in millimetres in a Cartesian frame
// centred on the bull, y pointing up, with the three microphones at
// (0,200), (200,0) and (-200,0). Those positions are not printed as such;
// they follow from the triangulation equations (80000 = 2*200^2 and the
// (y-200) term). The display side works in screen pixels, one pixel per
// millimetre, y pointing down.
//
// Scores travel between the scorer and the game logic as 8-character ASCII
// strings ("  ...NN" or "NO SCORE"), as in the original design, so that the
// same value can be drawn on screen without conversion.
package dartboard_pkg;

  typedef logic signed [8:0] coord9_t;   // detection-side coordinate, mm
  typedef logic signed [9:0] coord10_t;  // display-side coordinate, pixels
  typedef logic [63:0]       str8_t;     // eight ASCII characters

  localparam str8_t NO_SCORE = "NO SCORE";

  // Microphone baseline: all three circles are referred to this radius.
  localparam int MIC_R   = 200;
  localparam int MIC_2R2 = 2 * MIC_R * MIC_R;   // 80000

  // Dartboard ring radii in mm (regulation board).
  localparam int R_DBULL    = 7;
  localparam int R_BULL     = 16;
  localparam int R_TRIP_IN  = 99;
  localparam int R_TRIP_OUT = 107;
  localparam int R_DBL_IN   = 162;
  localparam int R_DBL_OUT  = 170;

  // Sector values counter-clockwise in screen terms from the +x axis for the
  // lower half (theta > 0, screen y down) and the upper half (theta < 0).
  // Index k covers |theta| in [0.1k - 0.05, 0.1k + 0.05) * pi.
  function automatic logic [4:0] sector_value(input logic lower, input logic [3:0] k);
    logic [4:0] lo [0:10];
    logic [4:0] up [0:10];
    lo = '{5'd6, 5'd10, 5'd15, 5'd2, 5'd17, 5'd3, 5'd19, 5'd7, 5'd16, 5'd8, 5'd11};
    up = '{5'd6, 5'd13, 5'd4, 5'd18, 5'd1, 5'd20, 5'd5, 5'd12, 5'd9, 5'd14, 5'd11};
    return lower ? lo[k] : up[k];
  endfunction

  // Two ASCII decimal digits of a value 0..99.
  function automatic logic [15:0] two_digits(input logic [6:0] v);
    logic [3:0] tens, ones;
    tens = 4'(v / 7'd10);
    ones = 4'(v % 7'd10);
    return {8'h30 + 8'(tens), 8'h30 + 8'(ones)};
  endfunction

  // Value of a two-digit ASCII score; "NO SCORE" (or anything else that is
  // not two digits in the low bytes) counts as 0.
  function automatic logic [6:0] score_value(input str8_t s);
    logic [7:0] t, o;
    t = s[15:8];
    o = s[7:0];
    if (s == NO_SCORE || t < 8'h30 || t > 8'h39 || o < 8'h30 || o > 8'h39) return 7'd0;
    return 7'(t - 8'h30) * 7'd10 + 7'(o - 8'h30);
  endfunction

endpackage
