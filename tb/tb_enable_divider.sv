// Checks the enable divider: one enable every DIV cycles, exactly one
// cycle wide, first one DIV-1 clock edges after reset is released (loop
// index 8, as index 0 already follows the first edge).
`timescale 1ns/1ps
module tb_enable_divider;
  logic clk = 0, rst = 1, en;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  enable_divider #(.DIV(10)) dut (.clk, .rst, .en);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, cyc, pulses;
    last = -1; pulses = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (cyc = 0; cyc < 1000; cyc++) begin
      @(negedge clk);
      if (en) begin
        if (last < 0) begin
          checks++; if (cyc != 8) begin failures++; $display("first enable at %0d", cyc); end
        end else begin
          checks++; if (cyc - last != 10) begin failures++; $display("period %0d", cyc - last); end
        end
        last = cyc; pulses++;
      end
    end
    checks++; if (pulses != 100) begin failures++; $display("pulses %0d", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
