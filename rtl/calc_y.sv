// y coordinate of the dart.
//
// Subtracting the circle equations of microphones 0 and 1 and substituting
// gives the original design's closed form
//
//   y = (80000 + (d+d1)^2 - (d+d0)^2 - sqrt(S1 * S2)) / 800
//   S1 = 80000 - (d0-d1)^2
//   S2 = (2d + d0 + d1)^2 - 80000
//
// where d is the distance to the nearest microphone from calc_d. The
// arithmetic is this design's own: terms in one cycle, then a bit-serial
// square root and a bit-serial divide by 800 on the magnitude, truncating
// toward zero. A negative factor under the root is clamped to zero, and y
// saturates to the nine-bit signed range so that a wild value still reads
// as off the board.
//
// Timing: start is a one-cycle pulse with the inputs valid; done pulses
// 57 cycles later (term cycle, 20 root steps, 32 divide steps and
// hand-over cycles) and y holds until the next start.
module calc_y (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic        [8:0] d0,
  input  logic        [8:0] d1,
  input  logic        [9:0] d,
  output logic signed [8:0] y,
  output logic              done
);
  import dartboard_pkg::*;

  logic signed [47:0] s0, s1, sd, top_c, f1, f2;
  logic        [39:0] rad_c;
  always_comb begin
    s0    = 48'(d0);
    s1    = 48'(d1);
    sd    = 48'(d);
    top_c = 48'(MIC_2R2) + (sd + s1) * (sd + s1) - (sd + s0) * (sd + s0);
    f1    = 48'(MIC_2R2) - (s0 - s1) * (s0 - s1);
    f2    = (2 * sd + s0 + s1) * (2 * sd + s0 + s1) - 48'(MIC_2R2);
    if (f1 < 0 || f2 < 0) rad_c = '0;
    else rad_c = 40'(f1[17:0]) * 40'(f2[23:0]);
  end

  typedef enum logic [1:0] {IDLE, ROOT, DIVIDE} phase_t;
  phase_t phase;

  logic signed [47:0] top_q;
  logic        [39:0] rad_q;
  logic               sq_start, sq_done, dv_start, dv_done, neg_q;
  logic        [19:0] sq_root;
  logic        [31:0] num_mag, quo;

  isqrt_seq #(.W(40)) u_sqrt (
    .clk, .rst, .start(sq_start), .radicand(rad_q), .root(sq_root), .done(sq_done)
  );
  udiv_seq #(.N(32), .M(10)) u_div (
    .clk, .rst, .start(dv_start), .dividend(num_mag), .divisor(10'd800),
    .quotient(quo), .done(dv_done)
  );

  logic signed [47:0] num_c;
  assign num_c = top_q - 48'(sq_root);

  always_ff @(posedge clk) begin
    sq_start <= 1'b0;
    dv_start <= 1'b0;
    done     <= 1'b0;
    if (rst) begin
      phase   <= IDLE;
      y       <= '0;
      top_q   <= '0;
      rad_q   <= '0;
      num_mag <= '0;
      neg_q   <= 1'b0;
    end else begin
      case (phase)
        IDLE: if (start) begin
          top_q    <= top_c;
          rad_q    <= rad_c;
          sq_start <= 1'b1;
          phase    <= ROOT;
        end
        ROOT: if (sq_done) begin
          num_mag  <= 32'(num_c < 0 ? -num_c : num_c);
          neg_q    <= num_c < 0;
          dv_start <= 1'b1;
          phase    <= DIVIDE;
        end
        DIVIDE: if (dv_done) begin
          if (neg_q) y <= (quo > 32'd256) ? -9'sd256 : -$signed(9'(quo));
          else       y <= (quo > 32'd255) ?  9'sd255 :  $signed(9'(quo));
          done  <= 1'b1;
          phase <= IDLE;
        end
        default: phase <= IDLE;
      endcase
    end
  end
endmodule
