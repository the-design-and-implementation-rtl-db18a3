// Timed reset of the microphone latches and the counter.
//
// The external NAND latches that hold each microphone's first impact need
// their reset held far longer than one clock, so a pulse on reset_lc (from
// the dart register) starts a timer of HOLD_CYCLES clock cycles, one third
// of a second at 27 MHz in the original design. While it runs,
// latch_reset is low (the latches reset on a low level) and counter_reset
// is high. A pulse during the hold restarts it. rst starts a hold too, so
// that the latches are cleared at power-up (an addition to the original).
//
// Timing: both outputs change one cycle after reset_lc and return after
// HOLD_CYCLES + 1 cycles.
module analog_latch_reset #(
  parameter int unsigned HOLD_CYCLES = 9_000_000
) (
  input  logic clk,
  input  logic rst,
  input  logic reset_lc,
  output logic latch_reset,
  output logic counter_reset
);
  localparam int unsigned CW = $clog2(HOLD_CYCLES + 1);
  logic [CW-1:0] cnt;
  logic          active;

  always_ff @(posedge clk) begin
    if (rst || reset_lc) begin
      cnt           <= '0;
      active        <= 1'b1;
      latch_reset   <= 1'b0;
      counter_reset <= 1'b1;
    end else if (active) begin
      if (cnt == CW'(HOLD_CYCLES)) begin
        active        <= 1'b0;
        latch_reset   <= 1'b1;
        counter_reset <= 1'b0;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
