// Checks calc_x: for random dart positions, with d0..d2, d and y rounded
// from the true geometry, x must be within 1 mm of the closed form
// +/-sqrt((d+d0)^2 - (y-200)^2) evaluated in floating point on the same
// integers, and within 12 mm of the true x at least 40 mm from the y axis
// (closer to the axis the square root magnifies the rounding of the
// inputs). Also checks that ready falls on start and
// rises after the fixed latency.
`timescale 1ns/1ps
module tb_calc_x;
  function automatic real mic_dist(input real x, input real y, input real mx, input real my);
    return $sqrt((x - mx) * (x - mx) + (y - my) * (y - my));
  endfunction
  logic clk = 0, rst = 1, start = 0, ready;
  logic [8:0] d0, d1, d2;
  logic [9:0] d;
  logic signed [8:0] y, x;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  calc_x dut (.*);

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real px, py, r0, r1, r2, m, err, rad, xref;
    int lat;
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 300; i++) begin
      px = $itor($urandom_range(0, 340)) - 170.0;
      py = $itor($urandom_range(0, 340)) - 170.0;
      if ($sqrt(px * px + py * py) > 170.0) continue;
      r0 = mic_dist(px, py, 0, 200); r1 = mic_dist(px, py, 200, 0); r2 = mic_dist(px, py, -200, 0);
      m = r0; if (r1 < m) m = r1; if (r2 < m) m = r2;
      d0 = 9'($rtoi(r0 - m + 0.5)); d1 = 9'($rtoi(r1 - m + 0.5)); d2 = 9'($rtoi(r2 - m + 0.5));
      d = 10'($rtoi(m + 0.5)); y = 9'($rtoi(py));
      start = 1; @(negedge clk); start = 0;
      checks++;
      if (ready) begin failures++; $display("ready did not fall on start"); end
      lat = 1;
      while (!ready) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 15) begin failures++; $display("latency %0d", lat); end
      rad  = ($itor(d) + $itor(d0)) ** 2 - ($itor(y) - 200.0) ** 2;
      xref = (rad > 0) ? $sqrt(rad) : 0.0;
      if (d1 > d2) xref = -xref;
      err = $itor(x) - xref;
      checks++;
      if (err > 1.0 || err < -1.0) begin
        failures++;
        $display("(%0.0f,%0.0f) x=%0d formula %0.2f", px, py, x, xref);
      end
      err = $itor(x) - px;
      if (px >= 40.0 || px <= -40.0) checks++;
      if ((px >= 40.0 || px <= -40.0) && (err > 12.0 || err < -12.0)) begin
        failures++;
        $display("(%0.0f,%0.0f) x=%0d", px, py, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
