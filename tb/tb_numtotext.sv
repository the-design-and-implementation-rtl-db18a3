// Checks the number-to-text converter for every 10-bit value: three ASCII
// characters, right-aligned with leading spaces, values above 999 shown as
// 999, one cycle after the value changes.
`timescale 1ns/1ps
module tb_numtotext;
  logic clk = 0;
  logic [9:0] value = 0;
  logic [23:0] text;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  numtotext dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string s;
    for (int v = 0; v < 1024; v++) begin
      value = 10'(v);
      @(negedge clk);
      s = $sformatf("%3d", (v > 999) ? 999 : v);
      checks++;
      if (text != {s[0], s[1], s[2]}) begin failures++; $display("%0d -> \"%s\" want \"%s\"", v, text, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
