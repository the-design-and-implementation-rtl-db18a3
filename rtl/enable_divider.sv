// Sample-rate enable for the microphone counter.
//
// Divides the 27 MHz detection clock by DIV and emits a one-cycle enable,
// giving the 2.7 MHz count rate of the design: at 340 m/s sound covers
// 0.125 mm per 2.7 MHz period, so eight counts are one millimetre and the
// conversion to distance is a three-bit shift. The division by ten is the
// original design's; the synchronous reset is an addition.
//
// Timing: en is high in one cycle out of every DIV, DIV-1 cycles after reset.
module enable_divider #(
  parameter int unsigned DIV = 10
) (
  input  logic clk,
  input  logic rst,
  output logic en
);
  logic [$clog2(DIV)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || cnt == ($clog2(DIV))'(DIV - 1)) cnt <= '0;
    else                                       cnt <= cnt + 1'b1;
  end

  assign en = (cnt == ($clog2(DIV))'(DIV - 1));
endmodule
