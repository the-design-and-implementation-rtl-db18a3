// Game screen and game control.
//
// This is the display side of the dartboard. It
//  - takes the three darts from the detection side when data_ready is
//    high, converting them to screen orientation (y flipped), and holds
//    data_taken high until data_ready falls (four-phase handshake, this
//    design's choice; the original pulsed data_taken for one cycle);
//  - scores each dart continuously with three dartscore units, rescoring
//    whenever a dart moves;
//  - lets the player correct a misplaced dart: with one of the three
//    dartcorrection switches set (100 = dart 1, 010 = dart 2, 001 =
//    dart 3), a held arrow button moves that dart by one pixel per frame
//    (on the falling edge of vsync), up having priority over down, left
//    and right;
//  - on a rising edge of enter (button 0) freezes the three scores and
//    commits them to game301 in the next cycle;
//  - composes the picture: the 453-line dartboard bitmap, read from an
//    external ROM and placed 261 pixels from the left, with orange dart
//    markers over it, and elsewhere a blue background with the text
//    strings and the turn marker ORed into the low three palette bits.
// Layout, colours and the handling above follow the original design,
// apart from the handshake, the turn marker colour (magenta, the palette
// entry nearest the red the original describes) and the ROM order.
//
// ROM: rom_addr = row * 456 + column (column = hcount - 261) is driven
// combinationally from hcount/vcount; rom_data must come back one cycle
// later (a synchronous ROM). pixel, phsync, pvsync and pblank lag
// hcount/vcount/hsync/vsync/blank by two cycles.
module dbdisplay (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      enter,
  input  logic                      up,
  input  logic                      down,
  input  logic                      left,
  input  logic                      right,
  input  logic [2:0]                dartcorrection,
  input  logic                      gamechoice,
  input  logic [10:0]               hcount,
  input  logic [9:0]                vcount,
  input  logic                      hsync,
  input  logic                      vsync,
  input  logic                      blank,
  input  dartboard_pkg::coord9_t    kx1, ky1, kx2, ky2, kx3, ky3,
  input  logic                      data_ready,
  output logic                      data_taken,
  output logic                      phsync,
  output logic                      pvsync,
  output logic                      pblank,
  output logic [7:0]                pixel,
  output logic [17:0]               rom_addr,
  input  logic [7:0]                rom_data,
  output dartboard_pkg::coord10_t   x1, y1, x2, y2, x3, y3,
  output dartboard_pkg::str8_t      dscore1, dscore2, dscore3,
  output logic                      dscore_rdy,
  output logic [31:0]               netscore1,
  output logic [31:0]               netscore2,
  output logic [9:0]                player1,
  output logic [9:0]                player2,
  output logic                      turn,
  output logic                      win1,
  output logic                      win2,
  output logic                      bust1,
  output logic                      bust2
);
  import dartboard_pkg::*;

  localparam int IMG_H    = 453;
  localparam int IMG_W    = 456;
  localparam int IMG_LEFT = 261;
  localparam int CENTER   = 226;
  localparam logic [7:0] ORANGE = 8'b0010_0111;
  localparam logic [7:0] BACK   = 8'b1111_1100;
  localparam coord10_t   CLEAR  = 10'sd230;

  // ---------------------------------------------------------------- control
  logic enter_q, vsync_q, ce, commit;
  logic dbl1, dbl2, dbl3;
  str8_t s1, s2, s3, s1_q, s2_q, s3_q;
  logic  d1_q, d2_q, d3_q;
  logic  r1, r2, r3;

  function automatic coord10_t flip(input coord9_t v);
    return -coord10_t'(v);
  endfunction

  always_ff @(posedge clk) begin
    ce      <= 1'b0;
    commit  <= 1'b0;
    enter_q <= enter;
    vsync_q <= vsync;
    if (rst) begin
      data_taken <= 1'b0;
      ce         <= 1'b1;
      x1 <= CLEAR; y1 <= CLEAR;
      x2 <= CLEAR; y2 <= CLEAR;
      x3 <= CLEAR; y3 <= CLEAR;
      s1_q <= NO_SCORE; s2_q <= NO_SCORE; s3_q <= NO_SCORE;
      d1_q <= 1'b0; d2_q <= 1'b0; d3_q <= 1'b0;
      enter_q <= 1'b0;
      vsync_q <= 1'b1;
    end else begin
      if (!data_ready) data_taken <= 1'b0;
      if (data_ready && !data_taken) begin
        x1 <= coord10_t'(kx1); y1 <= flip(ky1);
        x2 <= coord10_t'(kx2); y2 <= flip(ky2);
        x3 <= coord10_t'(kx3); y3 <= flip(ky3);
        data_taken <= 1'b1;
        ce         <= 1'b1;
      end else if (enter && !enter_q) begin
        s1_q <= s1; s2_q <= s2; s3_q <= s3;
        d1_q <= dbl1; d2_q <= dbl2; d3_q <= dbl3;
        commit <= 1'b1;
      end else if (!vsync && vsync_q && (up || down || left || right)) begin
        ce <= 1'b1;
        unique case (dartcorrection)
          3'b100: if (up) y1 <= y1 - 1'b1; else if (down) y1 <= y1 + 1'b1;
                  else if (left) x1 <= x1 - 1'b1; else x1 <= x1 + 1'b1;
          3'b010: if (up) y2 <= y2 - 1'b1; else if (down) y2 <= y2 + 1'b1;
                  else if (left) x2 <= x2 - 1'b1; else x2 <= x2 + 1'b1;
          3'b001: if (up) y3 <= y3 - 1'b1; else if (down) y3 <= y3 + 1'b1;
                  else if (left) x3 <= x3 - 1'b1; else x3 <= x3 + 1'b1;
          default: ce <= 1'b0;
        endcase
      end
    end
  end

  dartscore u_score1 (.clk, .rst, .ce, .x(x1), .y(y1), .score(s1), .double_hit(dbl1), .rdy(r1));
  dartscore u_score2 (.clk, .rst, .ce, .x(x2), .y(y2), .score(s2), .double_hit(dbl2), .rdy(r2));
  dartscore u_score3 (.clk, .rst, .ce, .x(x3), .y(y3), .score(s3), .double_hit(dbl3), .rdy(r3));

  assign dscore1    = s1;
  assign dscore2    = s2;
  assign dscore3    = s3;
  assign dscore_rdy = r1 & r2 & r3;

  game301 u_game (
    .clk, .rst, .commit,
    .score1(s1_q), .score2(s2_q), .score3(s3_q),
    .double1(d1_q), .double2(d2_q), .double3(d3_q),
    .gamechoice, .netscore1, .netscore2, .turn,
    .player1, .player2, .bust1, .bust2, .win1, .win2
  );

  // ---------------------------------------------------------------- picture
  logic in_img;
  assign in_img   = (vcount < 10'(IMG_H)) && (hcount > 11'(IMG_LEFT))
                 && (hcount < 11'(IMG_LEFT + IMG_W));
  assign rom_addr = in_img ? 18'(vcount) * 18'(IMG_W) + 18'(hcount - 11'(IMG_LEFT)) : '0;

  logic hit1, hit2, hit3, turn_hit;
  dartblob u_blob1 (.x(12'(x1) + 12'(IMG_LEFT + CENTER)), .y(12'(y1) + 12'(CENTER)),
                    .hcount, .vcount, .hit(hit1));
  dartblob u_blob2 (.x(12'(x2) + 12'(IMG_LEFT + CENTER)), .y(12'(y2) + 12'(CENTER)),
                    .hcount, .vcount, .hit(hit2));
  dartblob u_blob3 (.x(12'(x3) + 12'(IMG_LEFT + CENTER)), .y(12'(y3) + 12'(CENTER)),
                    .hcount, .vcount, .hit(hit3));
  turnblob u_turn (.x(turn ? 11'd770 : 11'd20), .y(10'd40), .hcount, .vcount, .hit(turn_hit));

  logic [63:0] mode_str;
  assign mode_str = gamechoice ? {40'h0, "601"} : {40'h0, "301"};

  logic [2:0] tp [11];
  text_display u_t1  (.clk, .hcount, .vcount, .x0(11'd40),  .y0(10'd10),  .str("PLAYER 1"), .pixel(tp[0]));
  text_display u_t2  (.clk, .hcount, .vcount, .x0(11'd20),  .y0(10'd40),  .str(mode_str),   .pixel(tp[1]));
  text_display u_t3  (.clk, .hcount, .vcount, .x0(11'd800), .y0(10'd10),  .str("PLAYER 2"), .pixel(tp[2]));
  text_display u_t4  (.clk, .hcount, .vcount, .x0(11'd780), .y0(10'd40),  .str(mode_str),   .pixel(tp[3]));
  text_display u_t5  (.clk, .hcount, .vcount, .x0(11'd40),  .y0(10'd50),  .str("________"), .pixel(tp[4]));
  text_display u_t6  (.clk, .hcount, .vcount, .x0(11'd800), .y0(10'd50),  .str("________"), .pixel(tp[5]));
  text_display u_t7  (.clk, .hcount, .vcount, .x0(11'd200), .y0(10'd500), .str(s1),         .pixel(tp[6]));
  text_display u_t8  (.clk, .hcount, .vcount, .x0(11'd350), .y0(10'd500), .str(s2),         .pixel(tp[7]));
  text_display u_t9  (.clk, .hcount, .vcount, .x0(11'd500), .y0(10'd500), .str(s3),         .pixel(tp[8]));
  text_display u_p1  (.clk, .hcount, .vcount, .x0(11'd20),  .y0(10'd80),
                      .str({32'h0, netscore1}), .pixel(tp[9]));
  text_display u_p2  (.clk, .hcount, .vcount, .x0(11'd780), .y0(10'd80),
                      .str({32'h0, netscore2}), .pixel(tp[10]));

  logic [2:0] text_or;
  always_comb begin
    text_or = '0;
    for (int i = 0; i < 11; i++) text_or |= tp[i];
  end

  logic in_img_q, dart_q, turn_q;
  logic [1:0] hs_d, vs_d, bl_d;
  always_ff @(posedge clk) begin
    in_img_q <= in_img;
    dart_q   <= hit1 | hit2 | hit3;
    turn_q   <= turn_hit;
    if (in_img_q) pixel <= dart_q ? ORANGE : rom_data;
    else          pixel <= BACK | {5'b0, text_or} | (turn_q ? 8'd1 : 8'd0);
    hs_d <= {hs_d[0], hsync};
    vs_d <= {vs_d[0], vsync};
    bl_d <= {bl_d[0], blank};
  end
  assign phsync = hs_d[1];
  assign pvsync = vs_d[1];
  assign pblank = bl_d[1];
endmodule
