// Push-button debouncer.
//
// The output follows the input only after the input has held the same
// level for COUNT consecutive clock cycles: 650,000 cycles, 10 ms at
// 65 MHz, in the original design. Reset loads the current input level
// straight into the output.
module debounce #(
  parameter int unsigned COUNT = 650_000
) (
  input  logic clk,
  input  logic rst,
  input  logic noisy,
  output logic clean
);
  localparam int unsigned CW = $clog2(COUNT + 1);
  logic [CW-1:0] cnt;
  logic          last;

  always_ff @(posedge clk) begin
    if (rst) begin
      last  <= noisy;
      clean <= noisy;
      cnt   <= '0;
    end else if (noisy != last) begin
      last <= noisy;
      cnt  <= '0;
    end else if (cnt == CW'(COUNT)) begin
      clean <= last;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
