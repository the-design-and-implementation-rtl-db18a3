// Checks the x stability filter: steady rises only after x has matched for
// STEADY cycles with both qualifiers high, falls when x changes or a
// qualifier drops, and the latched coordinates follow x and y while steady.
`timescale 1ns/1ps
module tb_x_steady;
  logic clk = 0, rst = 1, counter_ready = 0, x_ready = 0, steady;
  logic signed [8:0] x = 0, y = 0, steady_x, steady_y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  x_steady #(.STEADY(30)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_rise(input int n, input string what);
    int c;
    c = 0;
    while (!steady && c < 200) begin @(negedge clk); c++; end
    checks++;
    if (c != n) begin failures++; $display("%s: steady after %0d cycles, expected %0d", what, c, n); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    x = 9'sd42; y = -9'sd17;
    repeat (50) @(negedge clk);
    checks++; if (steady) begin failures++; $display("steady without qualifiers"); end
    counter_ready = 1;
    repeat (50) @(negedge clk);
    checks++; if (steady) begin failures++; $display("steady without x_ready"); end
    x_ready = 1;
    expect_rise(30, "first");
    @(negedge clk);
    checks++; if (steady_x != 9'sd42 || steady_y != -9'sd17) begin failures++; $display("latched %0d %0d", steady_x, steady_y); end
    // x moves: the filter restarts
    x = 9'sd43; @(negedge clk);
    checks++; if (steady) begin failures++; $display("still steady after x changed"); end
    expect_rise(30, "after change");
    // x wobbles every 10 cycles: never steady
    for (int i = 0; i < 10; i++) begin
      x = (i % 2) ? 9'sd5 : 9'sd6;
      repeat (10) begin @(negedge clk); checks++; if (i > 0 && steady) begin failures++; $display("steady while wobbling"); end end
    end
    // qualifier drop
    expect_rise(21, "after wobble");
    counter_ready = 0; @(negedge clk);
    checks++; if (steady) begin failures++; $display("steady after counter_ready fell"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
