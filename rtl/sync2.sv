// Two-flop synchroniser for a level crossing into clk's domain.
// The output follows the input two to three clk edges later.
module sync2 (
  input  logic clk,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk) begin
    meta <= d;
    q    <= meta;
  end
endmodule
