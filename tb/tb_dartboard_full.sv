// Full-size run of the dartboard with the real timing parameters: the
// 1/3 s latch hold (9,000,000 cycles at 27 MHz) and the 10 ms button
// debounce (650,000 cycles at 65 MHz). Three darts (D20, T20, T19) are
// thrown through the microphone model, handed to the display, scored and
// committed, leaving player 1 on 301 - 157 = 144. It also checks that the
// latches are held in reset for the full 1/3 s after power-up and after
// each dart (a new request during a hold restarts it).
`timescale 1ns/1ps
module tb_dartboard_full;
  import dartboard_pkg::*;
  localparam int HOLD = 9_000_000;
  localparam int DEB  = 650_000;

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

  dartboard_top dut (.*);

  always_ff @(posedge clk65) rom_data <= 8'(rom_addr) ^ 8'(rom_addr >> 8);

  initial begin
    #4_000_000_000;
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

  // length of each latch hold, in 27 MHz cycles
  longint hold_start = 0;
  int n_holds_ok = 0;
  always @(posedge clk27) begin
    if (!latch_reset && hold_start == 0) hold_start <= cyc27;
    else if (dut.reset_lc) hold_start <= cyc27 + 1;   // a new request restarts the hold
    if (latch_reset && hold_start != 0) begin
      if (cyc27 - hold_start >= HOLD && cyc27 - hold_start <= HOLD + 40) n_holds_ok <= n_holds_ok + 1;
      else begin
        checks++; failures++;
        $display("FAIL latch hold of %0d cycles", cyc27 - hold_start);
      end
      hold_start <= 0;
    end
  end

  initial begin
    real x[3], y[3];
    x = '{0.0, 0.0, -31.8}; y = '{166.0, 103.0, -98.0};
    visit(x, y);
    commit();
    chk(dut.u_disp.player1 == 144 && dut.u_disp.turn == 1, "player 1 on 144, player 2 to throw");
    chk(n_holds_ok >= 3, $sformatf("full latch holds seen: %0d", n_holds_ok));
    chk(n_orange > 0 || n_frame > 0, "video running");
    $display("holds=%0d frames=%0d maxerr=%0d", n_holds_ok, n_frame, maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
