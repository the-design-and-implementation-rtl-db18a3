// Checks calc_y: random dart positions give d0, d1, d (rounded from the
// true geometry); y must be within 2 mm of the closed-form y evaluated in
// floating point on the same integer inputs, and, for darts inside the
// line joining microphones 0 and 1 (x + y < 200, where that form picks the
// right intersection), within 8 mm of the true y (rounding of the inputs is magnified
// close to microphone 0). Also checks the fixed
// latency start -> done.
`timescale 1ns/1ps
module tb_calc_y;
  function automatic real mic_dist(input real x, input real y, input real mx, input real my);
    return $sqrt((x - mx) * (x - mx) + (y - my) * (y - my));
  endfunction
  logic clk = 0, rst = 1, start = 0, done;
  logic [8:0] d0, d1;
  logic [9:0] d;
  logic signed [8:0] y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  calc_y dut (.*);

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real px, py, r0, r1, r2, m, err, dd, rad, yref;
    int lat;
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 300; i++) begin
      px = $itor($urandom_range(0, 340)) - 170.0;
      py = $itor($urandom_range(0, 340)) - 170.0;
      if ($sqrt(px * px + py * py) > 170.0) continue;
      r0 = mic_dist(px, py, 0, 200); r1 = mic_dist(px, py, 200, 0); r2 = mic_dist(px, py, -200, 0);
      m = r0; if (r1 < m) m = r1; if (r2 < m) m = r2;
      d0 = 9'($rtoi(r0 - m + 0.5)); d1 = 9'($rtoi(r1 - m + 0.5)); d = 10'($rtoi(m + 0.5));
      start = 1; @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 57) begin failures++; $display("latency %0d", lat); end
      dd   = $itor(d);
      rad  = (80000.0 - ($itor(d0) - $itor(d1)) ** 2) * ((2.0 * dd + $itor(d0) + $itor(d1)) ** 2 - 80000.0);
      if (rad < 0) rad = 0;
      yref = (80000.0 + (dd + $itor(d1)) ** 2 - (dd + $itor(d0)) ** 2 - $sqrt(rad)) / 800.0;
      err = $itor(y) - yref;
      checks++;
      if (err > 2.0 || err < -2.0) begin
        failures++;
        $display("(%0.0f,%0.0f) y=%0d formula %0.2f", px, py, y, yref);
      end
      if (px + py < 200.0) begin
        err = $itor(y) - py;
        checks++;
        if (err > 8.0 || err < -8.0) begin
          failures++;
          $display("(%0.0f,%0.0f) y=%0d", px, py, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
