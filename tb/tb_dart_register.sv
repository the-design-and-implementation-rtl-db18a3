// Checks the three-dart register: each x_steady rising edge stores one dart
// and pulses reset_lc in the next cycle; off-board darts are parked at
// (175,175); data_ready rises with the third dart; further darts are
// ignored; data_taken clears all darts to 230 and pulses reset_lc.
`timescale 1ns/1ps
module tb_dart_register;
  logic clk = 0, rst = 1, x_steady = 0, data_taken = 0;
  logic signed [8:0] x = 0, y = 0, x1, y1, x2, y2, x3, y3;
  logic reset_lc, data_ready;
  logic [1:0] dart_count;
  int checks = 0, failures = 0;
  int ex[3], ey[3];
  always #5 clk = ~clk;

  dart_register dut (.*);

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic throw(input int tx, input int ty);
    x = 9'(tx); y = 9'(ty);
    @(negedge clk); x_steady = 1;
    @(negedge clk);
    chk(reset_lc, "reset_lc pulse after steady edge");
    repeat (5) begin @(negedge clk); chk(!reset_lc, "reset_lc one cycle only"); end
    x_steady = 0; @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0; @(negedge clk);
    chk(x1 == 230 && y3 == 230 && !data_ready && dart_count == 0, "reset state");
    for (int round = 0; round < 40; round++) begin
      for (int k = 0; k < 3; k++) begin
        int tx, ty;
        tx = int'($urandom_range(0, 500)) - 250;
        ty = int'($urandom_range(0, 500)) - 250;
        if (round == 0 && k == 1) begin tx = 226; ty = -226; end
        if (round == 0 && k == 2) begin tx = 227; ty = 0; end
        if (round == 1 && k == 0) begin tx = 0; ty = -227; end
        throw(tx, ty);
        if (tx > 226 || tx < -226 || ty > 226 || ty < -226) begin ex[k] = 175; ey[k] = 175; end
        else begin ex[k] = tx; ey[k] = ty; end
        chk(dart_count == 2'(k + 1), "dart count");
        chk(data_ready == (k == 2), "data_ready with third dart only");
      end
      chk(x1 == ex[0] && y1 == ey[0] && x2 == ex[1] && y2 == ey[1] && x3 == ex[2] && y3 == ey[2],
          $sformatf("stored darts %0d,%0d %0d,%0d %0d,%0d", x1, y1, x2, y2, x3, y3));
      // a fourth dart is ignored
      x = 9'sd1; y = 9'sd1;
      @(negedge clk); x_steady = 1; repeat (2) @(negedge clk); x_steady = 0; @(negedge clk);
      chk(x3 == ex[2] && y3 == ey[2] && x1 == ex[0] && dart_count == 3, "fourth dart ignored");
      // display takes the darts
      data_taken = 1; @(negedge clk); data_taken = 0;
      chk(reset_lc, "reset_lc on data_taken");
      chk(!data_ready && dart_count == 0 && x1 == 230 && y1 == 230 && x2 == 230 && x3 == 230 && y3 == 230,
          "clear on data_taken");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
