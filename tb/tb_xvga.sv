// Checks the 1024x768 timing generator over two whole frames: counter
// ranges and wrap, blank exactly outside the visible area, hsync low for
// hcount 1048..1183 and vsync low for lines 777..782, and the frame length
// of 1344 x 806 clocks.
`timescale 1ns/1ps
module tb_xvga;
  logic clk = 0, rst = 1;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic hsync, vsync, blank;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  xvga dut (.*);

  initial begin
    #30_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h, v, errs, frames, cyc, last_frame;
    errs = 0; frames = 0; last_frame = -1;
    @(negedge clk); @(negedge clk); rst = 0;
    h = 0; v = 0;
    for (cyc = 0; cyc < 2 * 1344 * 806 + 100; cyc++) begin
      if (hcount != 11'(h) || vcount != 10'(v)) errs++;
      if (blank != (h >= 1024 || v >= 768)) errs++;
      if (hsync != !(h >= 1048 && h <= 1183)) errs++;
      if (vsync != !(v >= 777 && v <= 782)) errs++;
      if (h == 0 && v == 0) begin
        if (last_frame >= 0) begin
          checks++;
          if (cyc - last_frame != 1344 * 806) begin failures++; $display("frame %0d clocks", cyc - last_frame); end
        end
        last_frame = cyc; frames++;
      end
      if (errs > 0 && errs < 5) $display("mismatch at h=%0d v=%0d: %0d %0d %b %b %b", h, v, hcount, vcount, blank, hsync, vsync);
      checks++;
      if (errs != 0) begin failures++; errs = 0; end
      @(negedge clk);
      h++;
      if (h == 1344) begin h = 0; v++; if (v == 806) v = 0; end
      if (failures > 20) break;
    end
    checks++; if (frames != 3) begin failures++; $display("frames %0d", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
