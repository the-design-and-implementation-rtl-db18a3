// Checks the debouncer at a reduced count: bounces shorter than COUNT
// cycles never reach the output, and a level held steady appears after
// COUNT+2 cycles (COUNT+1 counting cycles after the edge is sampled).
`timescale 1ns/1ps
module tb_debounce;
  localparam int COUNT = 40;
  logic clk = 0, rst = 1, noisy = 0, clean;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  debounce #(.COUNT(COUNT)) dut (.*);

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic level;
    level = 0;
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 60; i++) begin
      // bounce: pulses shorter than COUNT, output must hold
      repeat ($urandom_range(0, 6)) begin
        noisy = ~noisy;
        repeat ($urandom_range(1, COUNT - 1)) begin
          @(negedge clk); checks++;
          if (clean != level) begin failures++; $display("glitch passed at step %0d", i); end
        end
      end
      // final edge, then hold; the level may or may not differ from clean
      noisy = ~noisy;
      begin
        int c;
        c = 0;
        while (c < COUNT + 1) begin
          @(negedge clk); c++; checks++;
          if (clean != level) begin failures++; $display("early change at %0d", c); end
        end
        @(negedge clk);
        checks++;
        if (clean != noisy) begin failures++; $display("output %b after %0d cycles, wanted %b", clean, COUNT + 2, noisy); end
        level = noisy;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
