// Checks the latch-reset timer at a reduced hold: after rst or a reset_lc
// pulse, latch_reset stays low and counter_reset high for HOLD+1 cycles,
// then they swap; a new reset_lc during the hold restarts it.
`timescale 1ns/1ps
module tb_analog_latch_reset;
  localparam int HOLD = 50;
  logic clk = 0, rst = 1, reset_lc = 0, latch_reset, counter_reset;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  analog_latch_reset #(.HOLD_CYCLES(HOLD)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // counts cycles from the release edge until latch_reset rises
  task automatic measure(input string what);
    int c;
    c = 0;
    while (!latch_reset && c < 10 * HOLD) begin
      checks++;
      if (!counter_reset) begin failures++; $display("%s: counter_reset low during hold", what); end
      @(negedge clk); c++;
    end
    checks++;
    if (c != HOLD + 1) begin failures++; $display("%s: hold %0d cycles, expected %0d", what, c, HOLD + 1); end
    checks++;
    if (counter_reset) begin failures++; $display("%s: counter_reset still high", what); end
  endtask

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    measure("power-up");
    repeat (20) begin
      @(negedge clk); checks++;
      if (!latch_reset || counter_reset) begin failures++; $display("not idle"); end
    end
    for (int i = 0; i < 10; i++) begin
      reset_lc = 1; @(negedge clk); reset_lc = 0;
      if (i % 3 == 2) begin
        // restart during the hold
        repeat ($urandom_range(1, HOLD - 1)) @(negedge clk);
        reset_lc = 1; @(negedge clk); reset_lc = 0;
      end
      measure($sformatf("pulse %0d", i));
      repeat ($urandom_range(1, 30)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
