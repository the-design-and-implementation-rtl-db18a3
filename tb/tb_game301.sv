// Checks the 301/601 game rules against a reference model over many random
// turns: double-in (only darts from the first double count until a player
// has started), subtraction, bust (total too large, leaving 1, or reaching
// zero without a double), win on an exact double, alternation of turns,
// the 301/601 switch before the first commit, and the ASCII net score
// ("BUST", "WIN" or three right-aligned digits). It also replays the case
// of a 64-point opening turn: " 301" becomes " 237" and the turn passes.
`timescale 1ns/1ps
module tb_game301;
  import dartboard_pkg::*;
  logic clk = 0, rst = 1, commit = 0, gamechoice = 0;
  str8_t score1 = NO_SCORE, score2 = NO_SCORE, score3 = NO_SCORE;
  logic double1 = 0, double2 = 0, double3 = 0;
  logic [31:0] netscore1, netscore2;
  logic turn, bust1, bust2, win1, win2;
  logic [9:0] player1, player2;
  int checks = 0, failures = 0;
  int n_bust = 0, n_win = 0, n_sub = 0, n_nodouble = 0;
  always #5 clk = ~clk;

  game301 dut (.*);

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic str8_t sstr(input int v, input bit miss);
    if (miss) return NO_SCORE;
    return {48'h0, 8'h30 + 8'(v / 10), 8'h30 + 8'(v % 10)};
  endfunction

  function automatic logic [31:0] nstr(input int v);
    string s;
    s = $sformatf("%3d", v);
    return {8'h00, s[0], s[1], s[2]};
  endfunction

  // one random dart: value, double flag, miss flag
  task automatic rand_dart(output int v, output bit d, output bit m, input int bias);
    int kind, seg;
    kind = int'($urandom_range(0, 99));
    seg = int'($urandom_range(1, 20));
    v = 0; d = 0; m = 0;
    if (kind < 10) m = 1;
    else if (kind < 30 + bias) begin v = 2 * seg; d = 1; end
    else if (kind < 45) v = 3 * seg;
    else if (kind < 48) v = 25;
    else if (kind < 50) begin v = 50; d = 1; end
    else v = seg;
  endtask

  int p[2], start;
  bit in_game[2];
  bit won;
  int tn;

  task automatic play(input int v[3], input bit d[3], input bit m[3]);
    int cur, total, first, last;
    bit exp_bust, exp_win;
    score1 = sstr(v[0], m[0]); score2 = sstr(v[1], m[1]); score3 = sstr(v[2], m[2]);
    double1 = d[0]; double2 = d[1]; double3 = d[2];
    cur = p[tn];
    first = 3;
    if (cur != start) first = 0;
    else for (int i = 2; i >= 0; i--) if (d[i] && !m[i]) first = i;
    total = 0;
    for (int i = first; i < 3; i++) if (!m[i]) total += v[i];
    last = -1;
    for (int i = 0; i < 3; i++) if (!m[i]) last = i;
    exp_bust = 0; exp_win = 0;
    if (first == 3) n_nodouble++;
    if (total + 1 < cur) begin p[tn] = cur - total; n_sub++; end
    else if (total == cur && last >= 0 && d[last]) begin p[tn] = 0; exp_win = 1; n_win++; end
    else begin exp_bust = 1; n_bust++; end
    @(negedge clk); commit = 1; @(negedge clk); commit = 0; @(negedge clk);
    chk(turn == !tn, "turn toggles");
    chk(player1 == 10'(p[0]) && player2 == 10'(p[1]),
        $sformatf("players %0d %0d want %0d %0d", player1, player2, p[0], p[1]));
    chk((tn ? bust2 : bust1) == exp_bust && (tn ? bust1 : bust2) == 0, "bust flag");
    chk((tn ? win2 : win1) == exp_win, "win flag");
    if (exp_bust) chk((tn ? netscore2 : netscore1) == "BUST", "BUST text");
    else if (exp_win) chk((tn ? netscore2 : netscore1) == {8'h00, "WIN"}, "WIN text");
    else chk((tn ? netscore2 : netscore1) == nstr(p[tn]), $sformatf("net text %h", tn ? netscore2 : netscore1));
    chk((tn ? netscore1 : netscore2) == nstr(p[!tn]), "other net text");
    tn = !tn;
    won = exp_win;
  endtask

  initial begin
    int v[3];
    bit d[3], m[3];
    repeat (3) @(negedge clk); rst = 0; @(negedge clk);
    // opening turn of 64 from 301: D20, 12, 12
    @(negedge clk);
    chk(netscore1 == 32'd3354673 && netscore2 == 32'h00333031, "initial \" 301\"");
    p = '{301, 301}; start = 301; tn = 0;
    v = '{40, 12, 12}; d = '{1, 0, 0}; m = '{0, 0, 0};
    play(v, d, m);
    chk(netscore1 == 32'd3289911 && turn == 1, "Figure case: 237 and player 2 to throw");
    // many random games, alternating 301 and 601
    for (int g = 0; g < 60; g++) begin
      rst = 1; gamechoice = g[0]; @(negedge clk); rst = 0;
      // the switch may be flipped before the first commit
      gamechoice = !g[0]; @(negedge clk); @(negedge clk);
      start = g[0] ? 301 : 601;
      chk(player1 == 10'(start) && player2 == 10'(start), "start value follows switch");
      p = '{start, start}; tn = 0; won = 0;
      for (int t = 0; t < 400 && !won; t++) begin
        for (int i = 0; i < 3; i++) rand_dart(v[i], d[i], m[i], (p[tn] < 60) ? 30 : 0);
        // near the end, aim at the exact finishing double sometimes
        if (p[tn] <= 40 && p[tn] % 2 == 0 && $urandom_range(0, 2) == 0) begin
          v[2] = p[tn] - ((m[0] ? 0 : v[0]) + (m[1] ? 0 : v[1]));
          if (v[2] >= 2 && v[2] <= 40 && v[2] % 2 == 0) begin d[2] = 1; m[2] = 0; end
          else begin v[0] = p[tn]; d[0] = 1; m[0] = 0; m[1] = 1; m[2] = 1; end
        end
        play(v, d, m);
      end
      if (won) begin
        // no further commits once someone has won
        @(negedge clk); commit = 1; @(negedge clk); commit = 0; @(negedge clk);
        chk(turn == tn, "turn frozen after win");
      end
    end
    chk(n_bust > 10 && n_win > 10 && n_sub > 100 && n_nodouble > 10,
        $sformatf("coverage bust=%0d win=%0d sub=%0d nodouble=%0d", n_bust, n_win, n_sub, n_nodouble));
    $display("bust=%0d win=%0d sub=%0d nodouble=%0d", n_bust, n_win, n_sub, n_nodouble);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
