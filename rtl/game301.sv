// Game state for 301 and 601, two players.
//
// Each player starts at 301 (gamechoice = 0) or 601 (gamechoice = 1); the
// choice follows the switch until the first turn is committed and again
// after reset. A turn is committed with a one-cycle commit pulse while the
// three dart scores (ASCII, "NO SCORE" for a miss) and their double flags
// are valid. Rules, as in the original design:
//  - Double in: while a player is still at the starting value, only the
//    first double dart of the turn and the darts after it count.
//  - The turn total is subtracted if it leaves at least 2.
//  - A total equal to the remaining score wins only if the last scoring
//    dart was a double (double out); the player is then at 0 and no
//    further turns are taken.
//  - Anything else is a bust: the score stands and "BUST" is shown for
//    that player until the next committed turn.
//  - The turn passes to the other player after every commit.
// The ASCII conversion of the scores into the display strings follows the
// original design; the turn total is worked out in the commit cycle here,
// where the original spent a second cycle on it.
//
// Outputs: netscore1/2 are four ASCII characters, "BUST", "\0WIN" or "\0"
// followed by the three-digit score; they lag the state by one cycle
// (numtotext). turn is 0 for player 1. Scores update one cycle after
// commit.
module game301 (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 commit,
  input  dartboard_pkg::str8_t score1,
  input  dartboard_pkg::str8_t score2,
  input  dartboard_pkg::str8_t score3,
  input  logic                 double1,
  input  logic                 double2,
  input  logic                 double3,
  input  logic                 gamechoice,
  output logic [31:0]          netscore1,
  output logic [31:0]          netscore2,
  output logic                 turn,
  output logic [9:0]           player1,
  output logic [9:0]           player2,
  output logic                 bust1,
  output logic                 bust2,
  output logic                 win1,
  output logic                 win2
);
  import dartboard_pkg::*;

  logic [9:0] start_value;
  logic       started;
  assign start_value = gamechoice ? 10'd601 : 10'd301;

  logic [6:0]  v1, v2, v3;
  logic        m1, m2, m3;          // dart is a miss
  logic [9:0]  cur, total;
  logic        doubled_in, last_double;
  always_comb begin
    v1 = score_value(score1);
    v2 = score_value(score2);
    v3 = score_value(score3);
    m1 = (score1 == NO_SCORE);
    m2 = (score2 == NO_SCORE);
    m3 = (score3 == NO_SCORE);
    cur        = turn ? player2 : player1;
    doubled_in = (cur != start_value);
    if (doubled_in)   total = 10'(v1) + 10'(v2) + 10'(v3);
    else if (double1 && !m1) total = 10'(v1) + 10'(v2) + 10'(v3);
    else if (double2 && !m2) total = 10'(v2) + 10'(v3);
    else if (double3 && !m3) total = 10'(v3);
    else              total = '0;
    last_double = (double3 && !m3) || (double2 && !m2 && m3) || (double1 && !m1 && m2 && m3);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      player1 <= start_value;
      player2 <= start_value;
      started <= 1'b0;
      turn    <= 1'b0;
      bust1   <= 1'b0;
      bust2   <= 1'b0;
      win1    <= 1'b0;
      win2    <= 1'b0;
    end else begin
      if (!started) begin
        player1 <= start_value;
        player2 <= start_value;
      end
      if (commit && !win1 && !win2) begin
        started <= 1'b1;
        turn    <= ~turn;
        bust1   <= 1'b0;
        bust2   <= 1'b0;
        if (total + 10'd1 < cur) begin
          if (turn) player2 <= cur - total;
          else      player1 <= cur - total;
        end else if (total == cur && last_double) begin
          if (turn) begin player2 <= '0; win2 <= 1'b1; end
          else      begin player1 <= '0; win1 <= 1'b1; end
        end else begin
          if (turn) bust2 <= 1'b1;
          else      bust1 <= 1'b1;
        end
      end
    end
  end

  logic [23:0] txt1, txt2;
  numtotext u_txt1 (.clk, .value(player1), .text(txt1));
  numtotext u_txt2 (.clk, .value(player2), .text(txt2));

  assign netscore1 = bust1 ? "BUST" : win1 ? {8'h00, "WIN"} : {8'h00, txt1};
  assign netscore2 = bust2 ? "BUST" : win2 ? {8'h00, "WIN"} : {8'h00, txt2};
endmodule
