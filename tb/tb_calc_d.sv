// Checks calc_d against the true geometry: for random dart positions on
// the board the extra path lengths d0..d2 are worked out in floating point
// and rounded; the returned d must be within 3 mm of the true distance to
// the nearest microphone. Also checks the fixed latency start -> done.
`timescale 1ns/1ps
module tb_calc_d;
  function automatic real mic_dist(input real x, input real y, input real mx, input real my);
    return $sqrt((x - mx) * (x - mx) + (y - my) * (y - my));
  endfunction
  logic clk = 0, rst = 1, start = 0, done;
  logic [8:0] d0, d1, d2;
  logic [9:0] d;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  calc_d dut (.*);

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x, y, r0, r1, r2, m, err;
    int lat;
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 300; i++) begin
      x = $itor($urandom_range(0, 340)) - 170.0;
      y = $itor($urandom_range(0, 340)) - 170.0;
      if (i == 0) begin x = 0; y = 0; end
      if ($sqrt(x * x + y * y) > 170.0) continue;
      r0 = mic_dist(x, y, 0, 200); r1 = mic_dist(x, y, 200, 0); r2 = mic_dist(x, y, -200, 0);
      m = r0; if (r1 < m) m = r1; if (r2 < m) m = r2;
      d0 = 9'($rtoi(r0 - m + 0.5)); d1 = 9'($rtoi(r1 - m + 0.5)); d2 = 9'($rtoi(r2 - m + 0.5));
      start = 1; @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 63) begin failures++; $display("latency %0d", lat); end
      err = $itor(d) - m;
      checks++;
      if (err > 3.0 || err < -3.0) begin
        failures++;
        $display("(%0.0f,%0.0f) d0..2=%0d %0d %0d d=%0d true %0.2f", x, y, d0, d1, d2, d, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
