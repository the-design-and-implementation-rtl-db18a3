// Checks the text overlay by scanning a region around strings placed at
// random positions: pixels are lit only inside the 8x8 cells of the string,
// in the given colour, one cycle behind the counters; the shapes of 'L',
// 'T', 'I' and '_' match their expected strokes; spaces and NUL are blank.
`timescale 1ns/1ps
module tb_text_display;
  localparam int N = 6;
  logic clk = 0;
  logic [10:0] hcount = 0, x0 = 0;
  logic [9:0] vcount = 0, y0 = 0;
  logic [8*N-1:0] str = "LT_I L";
  logic [2:0] pixel;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  text_display #(.NCHAR(N), .COLOR(3'b101)) dut (.*);

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit expect_on(input byte c, input int row, input int col);
    if (row > 6 || col > 4) return 0;
    case (c)
      "L": return col == 0 || row == 6;
      "T": return row == 0 || col == 2;
      "I": return col == 2 || ((row == 0 || row == 6) && col >= 1 && col <= 3);
      "_": return row == 6;
      default: return 0;
    endcase
  endfunction

  initial begin
    int px, py, dx, dy, lit;
    byte c;
    for (int t = 0; t < 12; t++) begin
      px = int'($urandom_range(0, 900)); py = int'($urandom_range(0, 700));
      if (t == 0) begin px = 0; py = 0; end
      x0 = 11'(px); y0 = 10'(py);
      str = (t % 2) ? "LT_I L" : {"T", 8'h00, "_ LI"};
      lit = 0;
      for (int v = py - 3; v < py + 12; v++)
        for (int h = px - 5; h < px + 8 * N + 5; h++) begin
          if (h < 0 || v < 0) continue;
          hcount = 11'(h); vcount = 10'(v);
          @(posedge clk); #1;
          dx = h - px; dy = v - py;
          c = (dx >= 0 && dx < 8 * N && dy >= 0 && dy < 8) ? str[8*N - 1 - 8*(dx/8) -: 8] : 8'h00;
          checks++;
          if (pixel != (expect_on(c, dy, dx % 8) ? 3'b101 : 3'b000)) begin
            failures++;
            if (failures < 10) $display("at %0d,%0d char '%c' row %0d col %0d pixel %b", h, v, c, dy, dx % 8, pixel);
          end
          if (pixel != 0) lit++;
        end
      checks++;
      if (lit < 30) begin failures++; $display("only %0d pixels lit", lit); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
