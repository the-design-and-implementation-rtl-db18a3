// Checks the display and game-control block:
//  - handshake: data_taken rises after data_ready, stays high until
//    data_ready falls, and the darts are copied with y flipped;
//  - scoring of the three darts (D20, T20, T19) and dscore_rdy;
//  - correction: dart moves of one pixel per vsync falling edge, with the
//    dart rescored (T20 moved out of the treble ring becomes 20);
//  - the 301/601 switch and a commit on the enter edge (one commit for a
//    held button), giving 301 - 117 = 184 and passing the turn;
//  - the picture: a full streaming scan checks ROM addressing, the
//    two-edge pixel lag (inputs applied after a falling edge are seen in
//    pixel after the second rising edge), the orange dart markers and the background
//    outside the board image; spot checks cover the turn marker, the
//    text, and the delayed sync signals.
`timescale 1ns/1ps
module tb_dbdisplay;
  import dartboard_pkg::*;
  logic clk = 0, rst = 1, enter = 0, up = 0, down = 0, left = 0, right = 0;
  logic [2:0] dartcorrection = 0;
  logic gamechoice = 0;
  logic [10:0] hcount = 0;
  logic [9:0] vcount = 0;
  logic hsync = 1, vsync = 1, blank = 0;
  coord9_t kx1 = 0, ky1 = 0, kx2 = 0, ky2 = 0, kx3 = 0, ky3 = 0;
  logic data_ready = 0, data_taken;
  logic phsync, pvsync, pblank;
  logic [7:0] pixel, rom_data = 0;
  logic [17:0] rom_addr;
  coord10_t x1, y1, x2, y2, x3, y3;
  str8_t dscore1, dscore2, dscore3;
  logic dscore_rdy;
  logic [31:0] netscore1, netscore2;
  logic [9:0] player1, player2;
  logic turn, win1, win2, bust1, bust2;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dbdisplay dut (.*);

  // synchronous ROM model: one-cycle read latency, content from the address
  function automatic logic [7:0] rom_f(input int a);
    return 8'(a) ^ 8'(a >> 8) ^ 8'(a >> 16);
  endfunction
  always_ff @(posedge clk) rom_data <= rom_f(int'(rom_addr));

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic str8_t two(input int v);
    return {48'h0, 8'h30 + 8'(v / 10), 8'h30 + 8'(v % 10)};
  endfunction

  task automatic wait_scores();
    int c;
    c = 0;
    @(negedge clk); @(negedge clk);
    while (!dscore_rdy && c < 100) begin @(negedge clk); c++; end
    chk(dscore_rdy, "dscore_rdy");
  endtask

  task automatic vsync_pulse();
    vsync = 0; repeat (3) @(negedge clk); vsync = 1; repeat (3) @(negedge clk);
  endtask

  // pixel for a held screen position
  task automatic pix_at(input int h, input int v, output logic [7:0] p);
    hcount = 11'(h); vcount = 10'(v);
    repeat (3) @(negedge clk);
    p = pixel;
  endtask

  function automatic bit on_dart(input int h, input int v, input int dx, input int dy);
    int cx, cy;
    cx = dx + 487; cy = dy + 226;
    return h >= cx - 4 && h < cx + 4 && v >= cy - 4 && v < cy + 4;
  endfunction

  initial begin
    logic [7:0] p;
    int c, errs;
    repeat (3) @(negedge clk); rst = 0;
    wait_scores();
    chk(dscore1 == NO_SCORE && dscore2 == NO_SCORE && dscore3 == NO_SCORE, "empty board scores nothing");
    chk(player1 == 301 && player2 == 301 && turn == 0, "301 start");
    gamechoice = 1; repeat (2) @(negedge clk);
    chk(player1 == 601 && player2 == 601, "601 before first commit");
    gamechoice = 0; repeat (2) @(negedge clk);
    chk(player1 == 301, "back to 301");

    // handshake: D20, T20, T19 in detection coordinates (y up)
    kx1 = 0; ky1 = 166; kx2 = 0; ky2 = 103; kx3 = -32; ky3 = -98;
    data_ready = 1;
    @(negedge clk); @(negedge clk);
    chk(data_taken, "data_taken raised");
    chk(x1 == 0 && y1 == -166 && x2 == 0 && y2 == -103 && x3 == -32 && y3 == 98, "darts copied with y flipped");
    repeat (20) @(negedge clk);
    chk(data_taken, "data_taken held while data_ready");
    data_ready = 0; @(negedge clk); @(negedge clk);
    chk(!data_taken, "data_taken released");
    wait_scores();
    chk(dscore1 == two(40) && dscore2 == two(60) && dscore3 == two(57),
        $sformatf("scores %s %s %s", dscore1, dscore2, dscore3));

    // correction of dart 2: down 5, then right 2; with no switch set nothing moves
    right = 1; vsync_pulse(); right = 0;
    chk(x1 == 0 && x2 == 0 && x3 == -32, "no move without dartcorrection");
    dartcorrection = 3'b010;
    down = 1; repeat (5) vsync_pulse(); down = 0;
    right = 1; repeat (2) vsync_pulse();
    chk(x2 == 2 && y2 == -98 && x1 == 0 && y1 == -166, $sformatf("dart 2 moved to %0d,%0d", x2, y2));
    right = 0; repeat (4) vsync_pulse();
    chk(x2 == 2, "no move without a button");
    wait_scores();
    chk(dscore2 == two(20), $sformatf("moved dart rescored %s", dscore2));
    // move it back into the treble
    up = 1; left = 1; repeat (5) vsync_pulse(); up = 0; repeat (2) vsync_pulse(); left = 0;
    chk(x2 == 0 && y2 == -103, $sformatf("dart 2 back at %0d,%0d", x2, y2));
    dartcorrection = 3'b001; left = 1; vsync_pulse(); right = 1; left = 0; vsync_pulse(); right = 0;
    chk(x3 == -32, "dart 3 left then right");
    wait_scores();
    chk(dscore2 == two(60), "treble again");

    // commit: 40 + 60 + 57 = 157 with double-in
    enter = 1; repeat (30) @(negedge clk); enter = 0; repeat (3) @(negedge clk);
    chk(player1 == 144 && turn == 1 && player2 == 301, $sformatf("after commit p1=%0d turn=%b", player1, turn));
    chk(netscore1 == {8'h00, "144"}, "net score text");
    enter = 1; @(negedge clk); enter = 0; repeat (3) @(negedge clk);
    chk(player2 == 301 - 157 && turn == 0, "player 2 commit uses same darts");

    // turn marker: player 1's square around (20,40)
    pix_at(6, 26, p);
    chk(p == 8'b1111_1101, $sformatf("turn marker %b", p));
    pix_at(757, 26, p);
    chk(p == 8'b1111_1100, $sformatf("no marker for player 2 %b", p));
    // plain background
    pix_at(100, 300, p);
    chk(p == 8'b1111_1100, "background");
    // text: "PLAYER 1" region has lit pixels
    c = 0;
    for (int v = 10; v < 18; v++)
      for (int h = 40; h < 104; h += 1) begin pix_at(h, v, p); if (p[2:0] != 0) c++; end
    chk(c > 40, $sformatf("PLAYER 1 text pixels %0d", c));

    // streaming scan of the visible area
    errs = 0;
    for (int v = 0; v < 768; v++)
      for (int h = 0; h < 1024 + 2; h++) begin
        hcount = 11'(h); vcount = 10'(v);
        hsync = (h % 7 == 0); blank = (h % 5 == 0);
        @(negedge clk);
        if (h >= 1) begin
          int hh;
          hh = h - 1;
          if (v < 453 && hh > 261 && hh < 717) begin
            logic [7:0] e;
            if (on_dart(hh, v, 0, -166) || on_dart(hh, v, 0, -103) || on_dart(hh, v, -32, 98)) e = 8'b0010_0111;
            else e = rom_f(v * 456 + hh - 261);
            if (pixel != e) begin errs++; if (errs < 5) $display("pixel %0d,%0d = %h want %h", hh, v, pixel, e); end
          end else if (pixel[7:3] != 5'b11111) begin
            errs++; if (errs < 5) $display("background %0d,%0d = %h", hh, v, pixel);
          end
          if (phsync != (hh % 7 == 0) || pblank != (hh % 5 == 0)) errs++;
        end
      end
    chk(errs == 0, $sformatf("streaming scan errors %0d", errs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
