// Dart marker.
//
// High when the pixel (hcount, vcount) lies in the 2*HALF square centred
// on (x, y): x - HALF <= hcount < x + HALF, likewise vertically. The
// original design draws 8x8 markers (HALF = 4). Coordinates are signed so
// that a marker partly off the left or top edge is clipped correctly.
// Combinational.
module dartblob #(
  parameter int HALF = 4
) (
  input  logic signed [11:0] x,
  input  logic signed [11:0] y,
  input  logic        [10:0] hcount,
  input  logic        [9:0]  vcount,
  output logic               hit
);
  logic signed [12:0] h, v;
  assign h   = 13'(hcount);
  assign v   = 13'(vcount);
  assign hit = (h >= 13'(x) - 13'(HALF)) && (h < 13'(x) + 13'(HALF))
            && (v >= 13'(y) - 13'(HALF)) && (v < 13'(y) + 13'(HALF));
endmodule
