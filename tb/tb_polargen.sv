// Checks the CORDIC polar converter against real-number sqrt and atan2:
// r within 1 pixel and theta (pi = 128) within 1 step, for random points
// and the axes, plus the ITER+2 cycle latency.
`timescale 1ns/1ps
module tb_polargen;
  logic clk = 0, rst = 1, start = 0, rdy;
  logic signed [9:0] x = 0, y = 0, theta;
  logic [9:0] r;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  polargen #(.ITER(12)) dut (.*);

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int px, input int py);
    real er, et;
    int lat, dt;
    x = 10'(px); y = 10'(py);
    start = 1; @(negedge clk); start = 0;
    lat = 1;
    while (!rdy && lat < 100) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 14) begin failures++; $display("latency %0d", lat); end
    er = $sqrt(real'(px * px + py * py));
    checks++;
    if (fabs(real'(r) - er) > 1.0) begin failures++; $display("(%0d,%0d) r=%0d want %f", px, py, r, er); end
    if (px != 0 || py != 0) begin
      et = $atan2(real'(py), real'(px)) / 3.14159265358979 * 128.0;
      dt = int'(theta) - int'(et);
      if (dt > 128) dt -= 256;
      if (dt < -128) dt += 256;
      checks++;
      if (dt > 1 || dt < -1) begin failures++; $display("(%0d,%0d) theta=%0d want %f", px, py, theta, et); end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0; @(negedge clk);
    one(100, 0); one(0, 100); one(-100, 0); one(0, -100); one(-170, -1); one(-170, 1);
    one(1, 1); one(230, 230); one(-230, 230); one(226, -226);
    for (int i = 0; i < 3000; i++)
      one(int'($urandom_range(0, 460)) - 230, int'($urandom_range(0, 460)) - 230);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
