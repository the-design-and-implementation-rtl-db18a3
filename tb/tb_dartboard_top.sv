// End-to-end test of the dartboard at reduced latch hold and debounce
// times. A model of the three microphone latches turns each simulated
// throw into arrival times (speed of sound 340 m/s, 27 MHz sampling); the
// design must locate the dart, collect three, hand them to the display,
// score them, accept corrections from the arrow buttons and play a 301
// game to a win. A reference model in this bench scores the darts the
// display received and follows the game rules.
//
// Mechanisms counted (each must happen at least once): dart located,
// latch hold, off-board dart parked, handshake, dart scored, correction
// move, commit, subtraction, turn without double-in, bust, win, 601
// switch, user reset, video frame, orange dart pixel on the VGA output.
`timescale 1ns/1ps
module tb_dartboard_top;
  import dartboard_pkg::*;
  localparam int HOLD = 3000;
  localparam int DEB  = 40;

  logic clk27 = 0, clk65 = 0;
  logic [2:0] mic = 0;
  logic latch_reset;
  logic button_enter = 0, button0 = 0, button_up = 0, button_down = 0, button_left = 0, button_right = 0;
  logic [7:0] sw = 0, led;
  logic [17:0] rom_addr;
  logic [7:0] rom_data = 0;
  logic [7:0] vga_red, vga_green, vga_blue;
  logic vga_hsync, vga_vsync, vga_blank_b;
  logic [63:0] hex_data;
  int checks = 0, failures = 0;

  always #18.518 clk27 = ~clk27;
  always #7.692 clk65 = ~clk65;

  dartboard_top #(.HOLD_CYCLES(HOLD), .DEBOUNCE_COUNT(DEB), .DIV(10)) dut (.*);

  always_ff @(posedge clk65) rom_data <= 8'(rom_addr) ^ 8'(rom_addr >> 8);

  initial begin
    #3_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ------------------------------------------------------------ microphones
  longint cyc27 = 0;
  longint arrive[3] = '{-1, -1, -1};
  always @(posedge clk27) begin
    cyc27 <= cyc27 + 1;
    for (int i = 0; i < 3; i++) begin
      if (!latch_reset) mic[i] <= 1'b0;
      else if (cyc27 == arrive[i]) mic[i] <= 1'b1;
    end
  end

  function automatic real mdist(input real x, input real y, input real mx, input real my);
    return $sqrt((x - mx) * (x - mx) + (y - my) * (y - my));
  endfunction

  // ------------------------------------------------------------ counters
  int n_located = 0, n_hold = 0, n_park = 0, n_hand = 0, n_scored = 0, n_move = 0;
  int n_commit = 0, n_sub = 0, n_nodouble = 0, n_bust = 0, n_win = 0, n_601 = 0;
  int n_ureset = 0, n_frame = 0, n_orange = 0;

  always @(posedge clk27) if (dut.reset_lc) n_hold++;
  always @(negedge vga_vsync) n_frame++;
  always @(posedge clk65)
    if (vga_blank_b && vga_red == 8'd224 && vga_green == 8'd128 && vga_blue == 8'd0) n_orange++;

  // ------------------------------------------------------------ throws
  real tx[3], ty[3];
  int maxerr = 0;

  task automatic throw(input real x, input real y, input int k);
    longint base;
    // wait until the latches are armed again
    while (!latch_reset || dut.counter_ready) @(posedge clk27);
    repeat (100) @(posedge clk27);
    base = cyc27 + 10;
    arrive[0] = base + longint'(mdist(x, y, 0, 200) * 27.0e6 / 340.0e3);
    arrive[1] = base + longint'(mdist(x, y, 200, 0) * 27.0e6 / 340.0e3);
    arrive[2] = base + longint'(mdist(x, y, -200, 0) * 27.0e6 / 340.0e3);
    tx[k] = x; ty[k] = y;
    fork
      begin
        @(posedge dut.reset_lc);
      end
      begin
        repeat (200000) @(posedge clk27);
        chk(0, $sformatf("dart at (%f,%f) not located", x, y));
      end
    join_any
    disable fork;
    @(posedge clk27); @(posedge clk27);
    n_located++;
  endtask

  // detected darts, detection coordinates
  function automatic int kx(input int k);
    return (k == 0) ? int'(dut.kx1) : (k == 1) ? int'(dut.kx2) : int'(dut.kx3);
  endfunction
  function automatic int ky(input int k);
    return (k == 0) ? int'(dut.ky1) : (k == 1) ? int'(dut.ky2) : int'(dut.ky3);
  endfunction

  // ------------------------------------------------------------ reference scoring
  int order[20] = '{20, 1, 18, 4, 13, 6, 10, 15, 2, 17, 3, 19, 7, 16, 8, 11, 14, 9, 12, 5};

  // score of a dart at screen position (x right, y down); -1 for off board
  task automatic ref_score(input int x, input int y, output int v, output bit dbl);
    real rr, phi;
    int sec;
    rr = $sqrt(real'(x * x + y * y));
    phi = $atan2(real'(x), real'(-y)) * 180.0 / 3.14159265358979;
    if (phi < 0) phi += 360.0;
    sec = int'($floor((phi + 9.0) / 18.0)) % 20;
    dbl = 0;
    if (rr >= 170.5) v = -1;
    else if (rr < 7.5) begin v = 50; dbl = 1; end
    else if (rr < 16.5) v = 25;
    else if (rr >= 98.5 && rr < 107.5) v = 3 * order[sec];
    else if (rr >= 161.5) begin v = 2 * order[sec]; dbl = 1; end
    else v = order[sec];
  endtask

  function automatic str8_t sstr(input int v);
    if (v < 0) return NO_SCORE;
    return {48'h0, 8'h30 + 8'(v / 10), 8'h30 + 8'(v % 10)};
  endfunction

  function automatic int sx(input int k);
    return (k == 0) ? int'(dut.u_disp.x1) : (k == 1) ? int'(dut.u_disp.x2) : int'(dut.u_disp.x3);
  endfunction
  function automatic int sy(input int k);
    return (k == 0) ? int'(dut.u_disp.y1) : (k == 1) ? int'(dut.u_disp.y2) : int'(dut.u_disp.y3);
  endfunction
  function automatic str8_t dsc(input int k);
    return (k == 0) ? dut.u_disp.dscore1 : (k == 1) ? dut.u_disp.dscore2 : dut.u_disp.dscore3;
  endfunction

  // ------------------------------------------------------------ game model
  int p[2] = '{301, 301};
  int start = 301;
  int tn = 0;
  bit won = 0;

  task automatic press(ref logic b);
    @(posedge clk65); b = 1;
    repeat (DEB + 20) @(posedge clk65);
    b = 0;
    repeat (DEB + 20) @(posedge clk65);
  endtask

  // three throws, hand-over and scoring checks; returns nothing
  task automatic visit(input real x[3], input real y[3]);
    int c;
    for (int k = 0; k < 3; k++) begin
      throw(x[k], y[k], k);
      if (k < 2) chk(!dut.data_ready, "data_ready before third dart");
    end
    // hand-over to the display
    c = 0;
    while (!dut.u_disp.data_taken && c < 1000) begin @(posedge clk65); c++; end
    chk(dut.u_disp.data_taken, "display took the darts");
    c = 0;
    while ((dut.data_ready || dut.dart_count != 0 || dut.u_disp.data_taken) && c < 1000) begin @(posedge clk65); c++; end
    chk(!dut.data_ready && dut.dart_count == 0 && !dut.u_disp.data_taken, "handshake completed");
    chk(dut.kx1 == 230 && dut.ky3 == 230, "detection register cleared");
    n_hand++;
    repeat (40) @(posedge clk65);
    chk(dut.u_disp.dscore_rdy, "scores ready");
    for (int k = 0; k < 3; k++) begin
      int v, ex, ey, e;
      bit dbl, off;
      off = (x[k] > 226.0 || x[k] < -226.0 || y[k] > 226.0 || y[k] < -226.0);
      if (off) begin
        chk(sx(k) == 175 && sy(k) == -175, $sformatf("off-board dart %0d parked, got (%0d,%0d)", k, sx(k), sy(k)));
        n_park++;
      end else begin
        ex = sx(k) - int'(x[k]); ey = -sy(k) - int'(y[k]);
        e = (ex < 0 ? -ex : ex) + (ey < 0 ? -ey : ey);
        if (e > maxerr) maxerr = e;
        chk(e <= 10, $sformatf("dart %0d at (%f,%f) located at (%0d,%0d)", k, x[k], y[k], sx(k), -sy(k)));
      end
      ref_score(sx(k), sy(k), v, dbl);
      chk(dsc(k) == sstr(v), $sformatf("dart %0d score %s want %0d", k, dsc(k), v));
      n_scored++;
    end
    chk(hex_data[31:16] == 16'(dut.u_disp.x3) && hex_data[15:0] == 16'(dut.u_disp.y3), "hex display shows dart 3");
  endtask

  // commit the three displayed darts and follow the rules
  task automatic commit();
    int v[3], cur, total, first, last;
    bit d[3], exp_bust, exp_win, frozen;
    frozen = won;
    for (int k = 0; k < 3; k++) ref_score(sx(k), sy(k), v[k], d[k]);
    cur = p[tn];
    first = 3;
    if (cur != start) first = 0;
    else for (int i = 2; i >= 0; i--) if (d[i] && v[i] >= 0) first = i;
    total = 0;
    for (int i = first; i < 3; i++) if (v[i] >= 0) total += v[i];
    last = -1;
    for (int i = 0; i < 3; i++) if (v[i] >= 0) last = i;
    exp_bust = 0; exp_win = 0;
    if (!frozen) begin
      if (first == 3) n_nodouble++;
      if (total + 1 < cur) begin p[tn] = cur - total; if (total > 0) n_sub++; end
      else if (total == cur && last >= 0 && d[last]) begin p[tn] = 0; exp_win = 1; end
      else exp_bust = 1;
    end
    press(button0);
    if (!frozen) n_commit++;
    chk(dut.u_disp.player1 == 10'(p[0]) && dut.u_disp.player2 == 10'(p[1]),
        $sformatf("scores %0d %0d want %0d %0d", dut.u_disp.player1, dut.u_disp.player2, p[0], p[1]));
    if (!frozen) begin
      chk(dut.u_disp.turn == !tn, "turn passed");
      chk((tn ? dut.u_disp.bust2 : dut.u_disp.bust1) == exp_bust, "bust flag");
      chk((tn ? dut.u_disp.win2 : dut.u_disp.win1) == exp_win, "win flag");
      if (exp_bust) n_bust++;
      if (exp_win) begin n_win++; won = 1; end
      tn = !tn;
    end else begin
      chk(dut.u_disp.turn == tn, "no play after a win");
    end
  endtask

  initial begin
    real x[3], y[3];
    int c;
    sw = 8'h01;
    repeat (200) @(posedge clk65);
    chk(dut.u_disp.player1 == 601 && dut.u_disp.player2 == 601, "601 selected");
    if (dut.u_disp.player1 == 601) n_601++;
    sw = 8'h00;
    repeat (10) @(posedge clk65);
    chk(dut.u_disp.player1 == 301, "back to 301 before the first commit");

    // P1: D20, T20, T20 = 160 with double-in -> 141
    x = '{0.0, 0.0, 0.0}; y = '{166.0, 103.0, 103.0};
    visit(x, y); commit();
    // P2: S1, S5, S20, no double: stays at 301; dart 3 nudged right by 3
    x = '{40.2, -40.2, 0.0}; y = '{123.6, 123.6, 130.0};
    visit(x, y);
    begin
      int x0;
      x0 = sx(2);
      sw[7:5] = 3'b001;
      @(posedge clk65); button_right = 1;
      c = 0;
      while (sx(2) != x0 + 3 && c < 4_000_000) begin @(posedge clk65); c++; end
      button_right = 0;
      repeat (DEB + 20) @(posedge clk65);
      chk(sx(2) == x0 + 3, $sformatf("dart 3 moved to %0d from %0d", sx(2), x0));
      n_move += sx(2) - x0;
      sw[7:5] = 3'b000;
      repeat (40) @(posedge clk65);
      chk(dut.u_disp.dscore3 == {48'h0, "20"}, "moved dart rescored");
    end
    commit();
    // P1: T20 x3 = 180 > 141 -> bust
    x = '{0.0, 0.0, 0.0}; y = '{103.0, 103.0, 103.0};
    visit(x, y); commit();
    // P2: off the board, one beyond the image
    x = '{0.0, 190.0, -150.0}; y = '{-250.0, -100.0, -150.0};
    visit(x, y); commit();
    // P1: T20, T19, D12 = 141 finishing on a double -> win
    x = '{0.0, -31.8, -97.6}; y = '{103.0, -98.0, 134.3};
    visit(x, y); commit();
    // no play after a win
    x = '{0.0, 0.0, 0.0}; y = '{50.0, 50.0, 50.0};
    visit(x, y); commit();
    chk(dut.u_disp.netscore1 == {8'h00, "WIN"}, "WIN shown");

    // user reset clears the game
    press(button_enter);
    repeat (100) @(posedge clk65);
    chk(dut.u_disp.player1 == 301 && dut.u_disp.player2 == 301 && !dut.u_disp.win1 && dut.u_disp.turn == 0,
        "user reset restarts the game");
    if (dut.u_disp.player1 == 301) n_ureset++;
    // let a frame complete with darts cleared
    c = n_frame;
    while (n_frame < c + 1) @(posedge clk65);

    $display("located=%0d hold=%0d park=%0d hand=%0d scored=%0d move=%0d commit=%0d sub=%0d nodouble=%0d bust=%0d win=%0d 601=%0d ureset=%0d frame=%0d orange=%0d maxerr=%0d",
             n_located, n_hold, n_park, n_hand, n_scored, n_move, n_commit, n_sub, n_nodouble, n_bust, n_win,
             n_601, n_ureset, n_frame, n_orange, maxerr);
    chk(n_located > 0, "dart located");
    chk(n_hold > 0, "latch hold");
    chk(n_park > 0, "dart parked");
    chk(n_hand > 0, "handshake");
    chk(n_scored > 0, "dart scored");
    chk(n_move > 0, "correction");
    chk(n_commit > 0, "commit");
    chk(n_sub > 0, "subtraction");
    chk(n_nodouble > 0, "no double-in");
    chk(n_bust > 0, "bust");
    chk(n_win > 0, "win");
    chk(n_601 > 0, "601 switch");
    chk(n_ureset > 0, "user reset");
    chk(n_frame > 0, "video frame");
    chk(n_orange > 0, "orange dart pixel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
