// Power-on reset: holds rst high for the first CYCLES clock edges after
// configuration (the lab board used a 16-bit shift register primed with
// ones for the same purpose), and again whenever ext is high.
module por_reset #(
  parameter int unsigned CYCLES = 16
) (
  input  logic clk,
  input  logic ext,
  output logic rst
);
  logic [$clog2(CYCLES+1)-1:0] cnt = '0;
  always_ff @(posedge clk) begin
    if (cnt != ($clog2(CYCLES+1))'(CYCLES)) cnt <= cnt + 1'b1;
  end
  assign rst = ext || (cnt != ($clog2(CYCLES+1))'(CYCLES));
endmodule
