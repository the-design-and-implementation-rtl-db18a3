// On-screen text string.
//
// Draws an NCHAR-character ASCII string whose top-left corner is at
// (x0, y0). The first character is the most significant byte of str. Each
// character occupies an 8x8 cell and is drawn from a 5x7 glyph in the
// cell's top-left corner; characters without a glyph (space, NUL) are
// blank. The display ORs the 3-bit outputs of all its strings into the
// screen colour, as in the original design. The original's font is not
// part of this design; the glyphs here cover the characters the game
// prints (digits, "PLAYER", "BUST", "WIN", "NO SCORE" and '_').
//
// Timing: pixel is registered, one cycle behind hcount/vcount.
module text_display #(
  parameter int unsigned NCHAR = 8,
  parameter logic [2:0]  COLOR = 3'b111
) (
  input  logic               clk,
  input  logic [10:0]        hcount,
  input  logic [9:0]         vcount,
  input  logic [10:0]        x0,
  input  logic [9:0]         y0,
  input  logic [8*NCHAR-1:0] str,
  output logic [2:0]         pixel
);
  // 5x7 glyph, row 0 in the top five bits, leftmost column in the MSB.
  function automatic logic [34:0] glyph(input logic [7:0] c);
    case (c)
      "0": return 35'b01110_10001_10011_10101_11001_10001_01110;
      "1": return 35'b00100_01100_00100_00100_00100_00100_01110;
      "2": return 35'b01110_10001_00001_00010_00100_01000_11111;
      "3": return 35'b11111_00010_00100_00010_00001_10001_01110;
      "4": return 35'b00010_00110_01010_10010_11111_00010_00010;
      "5": return 35'b11111_10000_11110_00001_00001_10001_01110;
      "6": return 35'b00110_01000_10000_11110_10001_10001_01110;
      "7": return 35'b11111_00001_00010_00100_01000_01000_01000;
      "8": return 35'b01110_10001_10001_01110_10001_10001_01110;
      "9": return 35'b01110_10001_10001_01111_00001_00010_01100;
      "A": return 35'b01110_10001_10001_11111_10001_10001_10001;
      "B": return 35'b11110_10001_10001_11110_10001_10001_11110;
      "C": return 35'b01110_10001_10000_10000_10000_10001_01110;
      "E": return 35'b11111_10000_10000_11110_10000_10000_11111;
      "I": return 35'b01110_00100_00100_00100_00100_00100_01110;
      "L": return 35'b10000_10000_10000_10000_10000_10000_11111;
      "N": return 35'b10001_11001_10101_10011_10001_10001_10001;
      "O": return 35'b01110_10001_10001_10001_10001_10001_01110;
      "P": return 35'b11110_10001_10001_11110_10000_10000_10000;
      "R": return 35'b11110_10001_10001_11110_10100_10010_10001;
      "S": return 35'b01111_10000_10000_01110_00001_00001_11110;
      "T": return 35'b11111_00100_00100_00100_00100_00100_00100;
      "U": return 35'b10001_10001_10001_10001_10001_10001_01110;
      "W": return 35'b10001_10001_10001_10101_10101_10101_01010;
      "Y": return 35'b10001_10001_01010_00100_00100_00100_00100;
      "_": return 35'b00000_00000_00000_00000_00000_00000_11111;
      default: return '0;
    endcase
  endfunction

  logic signed [12:0] dx, dy;
  logic               in_box;
  logic [7:0]         ch;
  logic [34:0]        g;
  logic [2:0]         row, col;
  logic               on;
  always_comb begin
    dx     = 13'(hcount) - 13'(x0);
    dy     = 13'(vcount) - 13'(y0);
    in_box = (dx >= 0) && (dx < 13'(8 * NCHAR)) && (dy >= 0) && (dy < 13'sd8);
    ch     = in_box ? str[8*NCHAR - 1 - 8*int'(dx[12:3]) -: 8] : 8'h00;
    g      = glyph(ch);
    row    = dy[2:0];
    col    = dx[2:0];
    on     = in_box && row < 3'd7 && col < 3'd5 && g[34 - 5*int'(row) - int'(col)];
  end

  always_ff @(posedge clk) pixel <= on ? COLOR : 3'b000;
endmodule
