// x coordinate of the dart.
//
// With d and y known, the circle of microphone 0 at (0,200) gives
//
//   |x| = sqrt((d+d0)^2 - (y-200)^2)
//
// and the side follows from which of the two side microphones heard first:
// x is positive (towards the microphone at (200,0)) when d1 <= d2, as in
// the original design. The square root is this design's bit-serial one; a
// negative radicand is clamped to zero and x saturates to nine bits signed.
//
// Timing: start is a one-cycle pulse with the inputs valid; ready falls on
// start and rises 15 cycles later (12 root steps and hand-over cycles), staying high with x held until
// the next start.
module calc_x (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic        [8:0] d0,
  input  logic        [8:0] d1,
  input  logic        [8:0] d2,
  input  logic        [9:0] d,
  input  logic signed [8:0] y,
  output logic signed [8:0] x,
  output logic              ready
);
  logic signed [31:0] r0, dy, rad_s;
  logic        [23:0] rad_c;
  always_comb begin
    r0    = 32'(d) + 32'(d0);
    dy    = 32'(y) - 32'sd200;
    rad_s = r0 * r0 - dy * dy;
    rad_c = (rad_s < 0) ? '0 : 24'(rad_s);
  end

  logic        [23:0] rad_q;
  logic               sq_start, sq_done, pos_q, busy;
  logic        [11:0] root;

  isqrt_seq #(.W(24)) u_sqrt (
    .clk, .rst, .start(sq_start), .radicand(rad_q), .root(root), .done(sq_done)
  );

  always_ff @(posedge clk) begin
    sq_start <= 1'b0;
    if (rst) begin
      x     <= '0;
      ready <= 1'b0;
      busy  <= 1'b0;
      rad_q <= '0;
      pos_q <= 1'b0;
    end else if (start) begin
      rad_q    <= rad_c;
      pos_q    <= (d1 <= d2);
      sq_start <= 1'b1;
      busy     <= 1'b1;
      ready    <= 1'b0;
    end else if (busy && sq_done) begin
      busy  <= 1'b0;
      ready <= 1'b1;
      if (pos_q) x <= (root > 12'd255) ?  9'sd255 :  $signed(9'(root));
      else       x <= (root > 12'd256) ? -9'sd256 : -$signed(9'(root));
    end
  end
endmodule
