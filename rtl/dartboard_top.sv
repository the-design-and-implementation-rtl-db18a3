// Automated dartboard: acoustic dart detection, scoring and XVGA display.
//
// Three microphones around the board feed external latches that go high
// when the sound of an impact arrives (mic[2:0]). In the 27 MHz domain a
// counter measures, at 2.7 MHz, how much later each microphone heard the
// impact than the first; a shift turns the counts into millimetres; three
// arithmetic units solve the circle equations for the distance d to the
// nearest microphone, then y, then x; a stability filter waits until x has
// settled; and the dart register collects three darts, restarting the
// latches and the counter for a third of a second after each. When three
// darts are held, data_ready crosses to the 65 MHz display domain, whose
// dbdisplay takes them, scores them, lets the players nudge any dart with
// the arrow buttons, and on button 0 charges the turn to the current
// player in a 301/601 game. The picture is an XVGA 1024x768 raster with
// the board bitmap from an external ROM.
//
// Interface. Buttons are active high (pressed = 1) and are debounced here.
// sw[0] selects 601, sw[7:5] select the dart to correct. The
// board bitmap ROM (rom_addr/rom_data, one-cycle read latency), the
// microphone latches (mic, latch_reset, active low) and the hex digit
// display (hex_data: steady x, steady y, dart 3 x, dart 3 y, 16 bits each)
// are outside this design. led[] follows the original: low while a
// microphone has fired, the counter is ready, darts are ready, and the
// two-bit dart count inverted.
//
// Crossing: the darts are held steady while data_ready is high, so only
// data_ready and data_taken are synchronised (two flops each). This is an
// addition; the original passed both directly between the domains.
//
// Lint note: the display's score and game-state outputs (dscore*, netscore*,
// player*, turn, win*, bust*) are left open on purpose. They are drawn on
// the screen inside dbdisplay and are brought out only for testing, so
// the empty-pin warnings for them are expected.
module dartboard_top #(
  parameter int unsigned HOLD_CYCLES    = 9_000_000,
  parameter int unsigned DEBOUNCE_COUNT = 650_000,
  parameter int unsigned DIV            = 10
) (
  input  logic        clk27,
  input  logic        clk65,
  // microphone latches
  input  logic [2:0]  mic,
  output logic        latch_reset,
  // buttons and switches
  input  logic        button_enter,
  input  logic        button0,
  input  logic        button_up,
  input  logic        button_down,
  input  logic        button_left,
  input  logic        button_right,
  input  logic [7:0]  sw,
  output logic [7:0]  led,
  // board bitmap ROM
  output logic [17:0] rom_addr,
  input  logic [7:0]  rom_data,
  // video
  output logic [7:0]  vga_red,
  output logic [7:0]  vga_green,
  output logic [7:0]  vga_blue,
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic        vga_blank_b,
  // hex digit display data
  output logic [63:0] hex_data
);
  import dartboard_pkg::*;

  // ---------------------------------------------------------------- resets
  logic por65, rst65, user_reset, rst27, user_reset27;
  por_reset u_por65 (.clk(clk65), .ext(1'b0), .rst(por65));
  debounce #(.COUNT(DEBOUNCE_COUNT)) u_db_rst (.clk(clk65), .rst(por65), .noisy(button_enter), .clean(user_reset));
  assign rst65 = por65 | user_reset;
  sync2    u_sync_rst (.clk(clk27), .d(user_reset), .q(user_reset27));
  por_reset u_por27 (.clk(clk27), .ext(user_reset27), .rst(rst27));

  logic up, down, left, right, b0;
  debounce #(.COUNT(DEBOUNCE_COUNT)) u_db_up    (.clk(clk65), .rst(rst65), .noisy(button_up),    .clean(up));
  debounce #(.COUNT(DEBOUNCE_COUNT)) u_db_down  (.clk(clk65), .rst(rst65), .noisy(button_down),  .clean(down));
  debounce #(.COUNT(DEBOUNCE_COUNT)) u_db_left  (.clk(clk65), .rst(rst65), .noisy(button_left),  .clean(left));
  debounce #(.COUNT(DEBOUNCE_COUNT)) u_db_right (.clk(clk65), .rst(rst65), .noisy(button_right), .clean(right));
  debounce #(.COUNT(DEBOUNCE_COUNT)) u_db_b0    (.clk(clk65), .rst(rst65), .noisy(button0),      .clean(b0));

  // ------------------------------------------------------ detection, 27 MHz
  logic        en, counter_reset, counter_ready, counter_ready_q;
  logic [11:0] delta0, delta1, delta2;
  logic [8:0]  d0, d1, d2;
  logic [9:0]  d;
  logic        d_done, y_done, x_ready, fresh, steady;
  coord9_t     y, x, steady_x, steady_y;
  coord9_t     kx1, ky1, kx2, ky2, kx3, ky3;
  logic        reset_lc, data_ready, data_taken, data_taken27;
  logic [1:0]  dart_count;
  logic        start_d;

  enable_divider #(.DIV(DIV)) u_div (.clk(clk27), .rst(rst27), .en);

  mic_counter u_counter (
    .clk(clk27), .en, .counter_reset, .mic,
    .delta0, .delta1, .delta2, .ready(counter_ready)
  );

  cycles_to_mm u_c2mm (.delta0, .delta1, .delta2, .d0, .d1, .d2);

  always_ff @(posedge clk27) begin
    counter_ready_q <= rst27 ? 1'b0 : counter_ready;
    // x from the previous dart must not pass the filter while a new one is computed
    if (rst27 || start_d) fresh <= 1'b0;
    else if (y_done)      fresh <= 1'b1;
  end
  assign start_d = counter_ready && !counter_ready_q;

  calc_d u_calc_d (.clk(clk27), .rst(rst27), .start(start_d), .d0, .d1, .d2, .d, .done(d_done));
  calc_y u_calc_y (.clk(clk27), .rst(rst27), .start(d_done), .d0, .d1, .d, .y, .done(y_done));
  calc_x u_calc_x (.clk(clk27), .rst(rst27), .start(y_done), .d0, .d1, .d2, .d, .y, .x, .ready(x_ready));

  x_steady u_steady (
    .clk(clk27), .rst(rst27), .counter_ready, .x_ready(x_ready && fresh),
    .x, .y, .steady, .steady_x, .steady_y
  );

  sync2 u_sync_taken (.clk(clk27), .d(data_taken), .q(data_taken27));

  dart_register u_dartreg (
    .clk(clk27), .rst(rst27), .x_steady(steady), .x, .y, .data_taken(data_taken27),
    .x1(kx1), .y1(ky1), .x2(kx2), .y2(ky2), .x3(kx3), .y3(ky3),
    .reset_lc, .data_ready, .dart_count
  );

  analog_latch_reset #(.HOLD_CYCLES(HOLD_CYCLES)) u_alr (
    .clk(clk27), .rst(rst27), .reset_lc, .latch_reset, .counter_reset
  );

  // -------------------------------------------------------- display, 65 MHz
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, blank, phsync, pvsync, pblank, data_ready65;
  logic [7:0]  pixel;
  coord10_t    ox1, oy1, ox2, oy2, ox3, oy3;

  xvga u_xvga (.clk(clk65), .rst(rst65), .hcount, .vcount, .hsync, .vsync, .blank);

  sync2 u_sync_ready (.clk(clk65), .d(data_ready), .q(data_ready65));

  dbdisplay u_disp (
    .clk(clk65), .rst(rst65), .enter(b0), .up, .down, .left, .right,
    .dartcorrection(sw[7:5]), .gamechoice(sw[0]),
    .hcount, .vcount, .hsync, .vsync, .blank,
    .kx1, .ky1, .kx2, .ky2, .kx3, .ky3,
    .data_ready(data_ready65), .data_taken,
    .phsync, .pvsync, .pblank, .pixel, .rom_addr, .rom_data,
    .x1(ox1), .y1(oy1), .x2(ox2), .y2(oy2), .x3(ox3), .y3(oy3),
    .dscore1(), .dscore2(), .dscore3(), .dscore_rdy(),
    .netscore1(), .netscore2(), .player1(), .player2(), .turn(),
    .win1(), .win2(), .bust1(), .bust2()
  );

  convertcolor u_color (.clk(clk65), .index(pixel), .r(vga_red), .g(vga_green), .b(vga_blue));

  logic hs_q, vs_q, bl_q;
  always_ff @(posedge clk65) begin
    hs_q <= phsync;
    vs_q <= pvsync;
    bl_q <= pblank;
  end
  assign vga_hsync   = hs_q;
  assign vga_vsync   = vs_q;
  assign vga_blank_b = ~bl_q;

  // ------------------------------------------------------- indicators
  assign led = {~dart_count, 1'b1, ~data_ready, ~counter_ready, ~mic[2], ~mic[1], ~mic[0]};
  assign hex_data = {16'(steady_x), 16'(steady_y), 16'(ox3), 16'(oy3)};
endmodule
