// Turn indicator.
//
// High when the pixel (hcount, vcount) lies in the 2*HALF square centred
// on (x, y). The display places it beside the score of the player whose
// turn it is. The original design uses a 32x32 square (HALF = 16).
// Combinational.
module turnblob #(
  parameter int HALF = 16
) (
  input  logic [10:0] x,
  input  logic [9:0]  y,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output logic        hit
);
  logic signed [12:0] h, v, cx, cy;
  assign h   = 13'(hcount);
  assign v   = 13'(vcount);
  assign cx  = 13'(x);
  assign cy  = 13'(y);
  assign hit = (h >= cx - 13'(HALF)) && (h < cx + 13'(HALF))
            && (v >= cy - 13'(HALF)) && (v < cy + 13'(HALF));
endmodule
