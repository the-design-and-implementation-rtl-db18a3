// Bit-serial unsigned divider (restoring division).
//
// One quotient bit per cycle, most significant first. It stands in for the
// divider cores the original design took from the FPGA vendor. Division by
// zero gives an all-ones quotient.
//
// Interface: a one-cycle start captures both operands; N cycles later done
// pulses for one cycle and quotient holds the result until the next start.
module udiv_seq #(
  parameter int unsigned N = 32,   // dividend and quotient width
  parameter int unsigned M = 24    // divisor width
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [N-1:0] dividend,
  input  logic [M-1:0] divisor,
  output logic [N-1:0] quotient,
  output logic         done
);
  logic [N-1:0]           q;
  logic [M:0]             rem;
  logic [M-1:0]           dv;
  logic [$clog2(N+1)-1:0] left;
  logic                   busy;

  logic [M:0] rem_in;
  logic       fits;
  assign rem_in = {rem[M-1:0], q[N-1]};
  assign fits   = (rem_in >= {1'b0, dv});

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      busy     <= 1'b0;
      quotient <= '0;
      q        <= '0;
      rem      <= '0;
      dv       <= '0;
      left     <= '0;
    end else if (start) begin
      busy <= 1'b1;
      q    <= dividend;
      dv   <= divisor;
      rem  <= '0;
      left <= ($clog2(N+1))'(N);
    end else if (busy) begin
      rem  <= fits ? rem_in - {1'b0, dv} : rem_in;
      q    <= {q[N-2:0], fits};
      left <= left - 1'b1;
      if (left == 1) begin
        busy     <= 1'b0;
        done     <= 1'b1;
        quotient <= {q[N-2:0], fits};
      end
    end
  end
endmodule
