// Three-dart holding register between detection and display.
//
// Each rising edge of x_steady stores the current (x,y) as the next of
// three darts and pulses reset_lc, which restarts the analog latches and
// the microphone counter for the next throw. A dart outside the +/-226 mm
// square (the image half-width) is parked at (175,175), just outside the
// scoring area, so that it still counts as thrown. After the third dart
// data_ready rises and further darts are ignored. data_taken from the
// display clears the darts (to 230, off the image) and the count, lowers
// data_ready and pulses reset_lc. All of this follows the original design;
// the synchronous reset is an addition.
//
// Timing: x1..y3, dart_count and data_ready update one cycle after the
// x_steady edge; reset_lc is a one-cycle pulse in that same cycle.
module dart_register #(
  parameter int LIMIT = 226,
  parameter int PARK  = 175,
  parameter int CLEAR = 230
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              x_steady,
  input  logic signed [8:0] x,
  input  logic signed [8:0] y,
  input  logic              data_taken,
  output logic signed [8:0] x1, y1, x2, y2, x3, y3,
  output logic              reset_lc,
  output logic              data_ready,
  output logic [1:0]        dart_count
);
  logic steady_q;
  logic off_board;
  logic signed [8:0] sx, sy;

  assign off_board = (x > 9'(LIMIT)) || (x < -9'(LIMIT)) || (y > 9'(LIMIT)) || (y < -9'(LIMIT));
  assign sx = off_board ? 9'(PARK) : x;
  assign sy = off_board ? 9'(PARK) : y;

  always_ff @(posedge clk) begin
    reset_lc <= 1'b0;
    steady_q <= x_steady;
    if (rst || data_taken) begin
      dart_count <= '0;
      data_ready <= 1'b0;
      reset_lc   <= data_taken;
      x1 <= 9'(CLEAR); y1 <= 9'(CLEAR);
      x2 <= 9'(CLEAR); y2 <= 9'(CLEAR);
      x3 <= 9'(CLEAR); y3 <= 9'(CLEAR);
      if (rst) steady_q <= 1'b0;
    end else if (x_steady && !steady_q) begin
      reset_lc <= 1'b1;
      case (dart_count)
        2'd0: begin x1 <= sx; y1 <= sy; dart_count <= 2'd1; end
        2'd1: begin x2 <= sx; y2 <= sy; dart_count <= 2'd2; end
        2'd2: begin x3 <= sx; y3 <= sy; dart_count <= 2'd3; data_ready <= 1'b1; end
        default: ;
      endcase
    end
  end
endmodule
