// Stability filter on the computed x coordinate.
//
// A new dart position is accepted only after x has been ready and unchanged
// for STEADY consecutive cycles while the microphone counter reports ready.
// This guards against taking a result computed from counts that were still
// moving. The window of 30 cycles is the original design's. The counter of
// matching cycles stops at 2*STEADY; any change of x, or either qualifier
// falling, restarts it.
//
// Interface: x_steady is a level, high while the condition holds.
// steady_x/steady_y take x and y on every cycle the condition holds.
module x_steady #(
  parameter int unsigned STEADY = 30
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              counter_ready,
  input  logic              x_ready,
  input  logic signed [8:0] x,
  input  logic signed [8:0] y,
  output logic              steady,
  output logic signed [8:0] steady_x,
  output logic signed [8:0] steady_y
);
  localparam int unsigned CW = $clog2(2 * STEADY + 2);
  logic [CW-1:0]      cnt;
  logic signed [8:0]  ref_x;

  assign steady = (cnt >= CW'(STEADY));

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      ref_x    <= '0;
      steady_x <= '0;
      steady_y <= '0;
    end else if (counter_ready && x_ready) begin
      if (cnt == '0) begin
        ref_x <= x;
        cnt   <= CW'(1);
      end else if (x == ref_x) begin
        if (cnt < CW'(2 * STEADY)) cnt <= cnt + 1'b1;
      end else begin
        cnt <= '0;
      end
      if (steady) begin
        steady_x <= x;
        steady_y <= y;
      end
    end else begin
      cnt <= '0;
    end
  end
endmodule
