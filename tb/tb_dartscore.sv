// Checks dart scoring from screen position (y down). The expected score is
// worked out independently: the angle is measured clockwise from straight
// up, the sector taken from the board's clockwise number order starting
// with 20, and the ring from the real radius. Points within 1.5 pixels of a
// ring edge or 2.5 degrees of a sector edge are skipped, as the hardware
// works from a rounded radius and a 1.4 degree angle step.
`timescale 1ns/1ps
module tb_dartscore;
  import dartboard_pkg::*;
  logic clk = 0, rst = 1, ce = 0, double_hit, rdy;
  logic signed [9:0] x = 0, y = 0;
  str8_t score;
  int checks = 0, failures = 0, tested = 0;
  int order[20] = '{20, 1, 18, 4, 13, 6, 10, 15, 2, 17, 3, 19, 7, 16, 8, 11, 14, 9, 12, 5};
  real edges[6] = '{7.5, 16.5, 98.5, 107.5, 161.5, 170.5};
  always #5 clk = ~clk;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  dartscore dut (.*);

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic str8_t expect_str(input int v);
    return {48'h0, 8'h30 + 8'(v / 10), 8'h30 + 8'(v % 10)};
  endfunction

  task automatic one(input int px, input int py);
    real rr, phi, f;
    int sec, v, lat;
    bit dbl, off;
    rr = $sqrt(real'(px * px + py * py));
    foreach (edges[i]) if (fabs(rr - edges[i]) < 1.5) return;
    phi = $atan2(real'(px), real'(-py)) * 180.0 / 3.14159265358979;
    if (phi < 0) phi += 360.0;
    f = (phi + 9.0) / 18.0;
    if (rr > 20.0 && fabs(f - $floor(f + 0.5)) < 2.5 / 18.0) return;
    sec = int'($floor(f)) % 20;
    off = 0; dbl = 0;
    if (rr > 170.5) off = 1;
    else if (rr < 7.5) begin v = 50; dbl = 1; end
    else if (rr < 16.5) v = 25;
    else if (rr > 98.5 && rr < 107.5) v = 3 * order[sec];
    else if (rr > 161.5) begin v = 2 * order[sec]; dbl = 1; end
    else v = order[sec];
    x = 10'(px); y = 10'(py);
    ce = 1; @(negedge clk); ce = 0;
    lat = 1;
    while (!rdy && lat < 100) begin @(negedge clk); lat++; end
    tested++;
    checks++;
    if (lat != 15) begin failures++; $display("latency %0d", lat); end
    checks++;
    if (off ? (score != NO_SCORE || double_hit) : (score != expect_str(v) || double_hit != dbl)) begin
      failures++;
      $display("(%0d,%0d) r=%f phi=%f got %s dbl=%b want %0d dbl=%b off=%b", px, py, rr, phi, score, double_hit, v, dbl, off);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0; @(negedge clk);
    // named targets: T20, D20, bull, double bull, D3 (bottom), T6 (right), S11 (left)
    one(0, -103); one(0, -166); one(12, 0); one(2, -3); one(0, 166); one(103, 0); one(-130, 0);
    one(200, 200);
    for (int i = 0; i < 4000; i++)
      one(int'($urandom_range(0, 440)) - 220, int'($urandom_range(0, 440)) - 220);
    checks++;
    if (tested < 2000) begin failures++; $display("only %0d points tested", tested); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
