// Checks the dart marker by scanning every screen position around
// random centres (including centres near and past the screen edges) and
// comparing against the 8x8 square [c-4, c+4) in both axes.
`timescale 1ns/1ps
module tb_dartblob;
  logic signed [11:0] x = 0, y = 0;
  logic [10:0] hcount = 0;
  logic [9:0] vcount = 0;
  logic hit;
  int checks = 0, failures = 0;

  dartblob #(.HALF(4)) dut (.*);

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cx, cy;
    for (int t = 0; t < 40; t++) begin
      cx = int'($urandom_range(0, 1100)) - 40;
      cy = int'($urandom_range(0, 840)) - 40;
      if (t == 0) begin cx = 0; cy = 0; end
      if (t == 1) begin cx = 1023; cy = 767; end
      x = 12'(cx); y = 12'(cy);
      for (int h = cx - 24; h <= cx + 24; h++)
        for (int v = cy - 24; v <= cy + 24; v++) begin
          if (h < 0 || v < 0 || h > 2047 || v > 1023) continue;
          hcount = 11'(h); vcount = 10'(v); #1;
          checks++;
          if (hit != (h >= cx - 4 && h < cx + 4 && v >= cy - 4 && v < cy + 4)) begin
            failures++; $display("dart (%0d,%0d) at %0d,%0d hit=%b", cx, cy, h, v, hit);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
