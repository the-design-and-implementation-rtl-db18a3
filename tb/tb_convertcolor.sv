// Checks the 256-entry palette: entries 10..245 follow the 3-3-2 rule
// (r = 32*(i%8), g = 32*((i/8)%8), b = 64*(i/64)), the twenty fixed
// entries at each end hold the listed colours (e.g. 9 is a light blue and
// 252 pure blue), the dart colour 39 is orange, and the output appears one
// cycle after the index.
`timescale 1ns/1ps
module tb_convertcolor;
  logic clk = 0;
  logic [7:0] index = 0, r, g, b;
  int checks = 0, failures = 0;
  int fixed_lo[10][3] = '{'{0,0,0}, '{128,0,0}, '{0,128,0}, '{128,128,0}, '{0,0,128},
                          '{128,0,128}, '{0,128,128}, '{192,192,192}, '{192,220,192}, '{166,202,240}};
  int fixed_hi[10][3] = '{'{255,251,240}, '{160,160,164}, '{128,128,128}, '{255,0,0}, '{0,255,0},
                          '{255,255,0}, '{0,0,255}, '{255,0,255}, '{0,255,255}, '{255,255,255}};
  always #5 clk = ~clk;

  convertcolor dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int er, eg, eb;
    for (int i = 0; i < 256; i++) begin
      index = 8'(i);
      @(posedge clk); #1;
      if (i < 10) begin er = fixed_lo[i][0]; eg = fixed_lo[i][1]; eb = fixed_lo[i][2]; end
      else if (i > 245) begin er = fixed_hi[i-246][0]; eg = fixed_hi[i-246][1]; eb = fixed_hi[i-246][2]; end
      else begin er = 32 * (i % 8); eg = 32 * ((i / 8) % 8); eb = 64 * (i / 64); end
      checks++;
      if (r != 8'(er) || g != 8'(eg) || b != 8'(eb)) begin
        failures++; $display("index %0d: %0d %0d %0d want %0d %0d %0d", i, r, g, b, er, eg, eb);
      end
      // output must not change before the next clock edge
      index = 8'(i + 1); #3;
      checks++;
      if (r != 8'(er) || g != 8'(eg) || b != 8'(eb)) begin failures++; $display("not registered at %0d", i); end
      @(negedge clk);
    end
    index = 8'd39; @(posedge clk); #1;
    checks++;
    if (r != 224 || g != 128 || b != 0) begin failures++; $display("dart colour %0d %0d %0d", r, g, b); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
