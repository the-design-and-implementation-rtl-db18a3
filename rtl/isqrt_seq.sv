// Bit-serial integer square root.
//
// Computes root = floor(sqrt(radicand)) with the digit-by-digit method: two
// radicand bits are brought down per cycle and one root bit is decided by a
// trial subtraction. It stands in for the square-root cores the original
// design took from the FPGA vendor; like them it truncates.
//
// Interface: a one-cycle start captures radicand; W/2 cycles later done
// pulses for one cycle and root holds the result until the next start.
module isqrt_seq #(
  parameter int unsigned W = 32          // radicand width, even
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [W-1:0]     radicand,
  output logic [W/2-1:0]   root,
  output logic             done
);
  localparam int unsigned H = W / 2;

  logic [W-1:0]         rad;
  logic [H+1:0]         rem;
  logic [H-1:0]         acc;
  logic [$clog2(H+1)-1:0] left;
  logic                 busy;

  logic [H+1:0] rem_in, trial;
  assign rem_in = {rem[H-1:0], rad[W-1 -: 2]};
  assign trial  = {acc, 2'b01};

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      busy <= 1'b0;
      root <= '0;
      rem  <= '0;
      acc  <= '0;
      rad  <= '0;
      left <= '0;
    end else if (start) begin
      busy <= 1'b1;
      rad  <= radicand;
      rem  <= '0;
      acc  <= '0;
      left <= ($clog2(H+1))'(H);
    end else if (busy) begin
      rad <= rad << 2;
      if (rem_in >= trial) begin
        rem <= rem_in - trial;
        acc <= {acc[H-2:0], 1'b1};
      end else begin
        rem <= rem_in;
        acc <= {acc[H-2:0], 1'b0};
      end
      left <= left - 1'b1;
      if (left == 1) begin
        busy <= 1'b0;
        done <= 1'b1;
        root <= (rem_in >= trial) ? {acc[H-2:0], 1'b1} : {acc[H-2:0], 1'b0};
      end
    end
  end
endmodule
