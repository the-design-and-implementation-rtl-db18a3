// Colour palette of the 8-bit dartboard bitmap.
//
// Maps an 8-bit palette index to 8-bit red, green and blue, registered.
// The palette is the classic 256-colour system palette the bitmap was
// saved with: indices 10..245 form a regular cube, r = 32*(i mod 8),
// g = 32*((i/8) mod 8), b = 64*(i/64); the ten entries at each end are
// the fixed system colours, listed below. The values are the original
// design's; generating the regular part by formula is this design's.
module convertcolor (
  input  logic       clk,
  input  logic [7:0] index,
  output logic [7:0] r,
  output logic [7:0] g,
  output logic [7:0] b
);
  logic [23:0] rgb;   // {r, g, b}
  always_comb begin
    case (index)
      8'd0:   rgb = {8'd0,   8'd0,   8'd0};
      8'd1:   rgb = {8'd128, 8'd0,   8'd0};
      8'd2:   rgb = {8'd0,   8'd128, 8'd0};
      8'd3:   rgb = {8'd128, 8'd128, 8'd0};
      8'd4:   rgb = {8'd0,   8'd0,   8'd128};
      8'd5:   rgb = {8'd128, 8'd0,   8'd128};
      8'd6:   rgb = {8'd0,   8'd128, 8'd128};
      8'd7:   rgb = {8'd192, 8'd192, 8'd192};
      8'd8:   rgb = {8'd192, 8'd220, 8'd192};
      8'd9:   rgb = {8'd166, 8'd202, 8'd240};
      8'd246: rgb = {8'd255, 8'd251, 8'd240};
      8'd247: rgb = {8'd160, 8'd160, 8'd164};
      8'd248: rgb = {8'd128, 8'd128, 8'd128};
      8'd249: rgb = {8'd255, 8'd0,   8'd0};
      8'd250: rgb = {8'd0,   8'd255, 8'd0};
      8'd251: rgb = {8'd255, 8'd255, 8'd0};
      8'd252: rgb = {8'd0,   8'd0,   8'd255};
      8'd253: rgb = {8'd255, 8'd0,   8'd255};
      8'd254: rgb = {8'd0,   8'd255, 8'd255};
      8'd255: rgb = {8'd255, 8'd255, 8'd255};
      default: rgb = {{index[2:0], 5'd0}, {index[5:3], 5'd0}, {index[7:6], 6'd0}};
    endcase
  end

  always_ff @(posedge clk) {r, g, b} <= rgb;
endmodule
