// Checks the turn marker: a 32x32 square [c-16, c+16) in both axes, scanned
// around the two positions the display uses and random ones, including a
// centre so close to the screen corner that the square is cut off.
`timescale 1ns/1ps
module tb_turnblob;
  logic [10:0] x = 0, hcount = 0;
  logic [9:0] y = 0, vcount = 0;
  logic hit;
  int checks = 0, failures = 0;

  turnblob #(.HALF(16)) dut (.*);

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cx, cy, n;
    for (int t = 0; t < 30; t++) begin
      cx = int'($urandom_range(0, 1023)); cy = int'($urandom_range(0, 767));
      if (t == 0) begin cx = 20; cy = 40; end
      if (t == 1) begin cx = 770; cy = 40; end
      if (t == 2) begin cx = 5; cy = 3; end
      x = 11'(cx); y = 10'(cy);
      n = 0;
      for (int h = cx - 40; h <= cx + 40; h++)
        for (int v = cy - 40; v <= cy + 40; v++) begin
          if (h < 0 || v < 0 || h > 2047 || v > 1023) continue;
          hcount = 11'(h); vcount = 10'(v); #1;
          checks++;
          if (hit) n++;
          if (hit != (h >= cx - 16 && h < cx + 16 && v >= cy - 16 && v < cy + 16)) begin
            failures++; $display("turn (%0d,%0d) at %0d,%0d hit=%b", cx, cy, h, v, hit);
          end
        end
      checks++;
      if (cx >= 16 && cy >= 16 && n != 32 * 32) begin failures++; $display("area %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
