// Binary score to three ASCII digits.
//
// Turns a player's remaining score (0..999) into three right-justified
// ASCII characters with leading spaces, e.g. 301 -> "301", 7 -> "  7".
// The original design used a lookup table of every value; here the digits
// are computed with divide-by-ten arithmetic. The output is registered, one
// cycle behind the input, as the table was.
module numtotext (
  input  logic        clk,
  input  logic [9:0]  value,
  output logic [23:0] text
);
  logic [9:0] v;
  logic [3:0] h, t, o;
  always_comb begin
    v = (value > 10'd999) ? 10'd999 : value;
    h = 4'(v / 10'd100);
    t = 4'((v / 10'd10) % 10'd10);
    o = 4'(v % 10'd10);
  end

  always_ff @(posedge clk) begin
    text[23:16] <= (h == 0) ? 8'h20 : 8'h30 + 8'(h);
    text[15:8]  <= (h == 0 && t == 0) ? 8'h20 : 8'h30 + 8'(t);
    text[7:0]   <= 8'h30 + 8'(o);
  end
endmodule
