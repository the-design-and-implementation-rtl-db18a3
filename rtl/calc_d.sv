// Distance from the dart to the nearest microphone.
//
// With the microphones at (0,200), (200,0) and (-200,0) mm and measured
// extra path lengths d0, d1, d2 (zero for the microphone that heard first),
// the three circle equations (d+di)^2 = (x-xi)^2 + (y-yi)^2 reduce to a
// quadratic in d whose relevant root is
//
//   d = (N - sqrt(T)) / (2*A)
//   N = 80000(d1+d2) - 2 d0^3 + d0^2(d1+d2) + d0(d1^2+d2^2) - d1^3 - d2^3
//   T = (80000-(d0-d1)^2) (80000-(d0-d2)^2) (160000-(d1-d2)^2)
//   A = -80000 + 2 d0^2 + d1^2 + d2^2 - 2 d0 (d1+d2)
//
// The equation is the original design's; the -2 d0^3 term is the one that
// solves the circle equations. The arithmetic is this design's own: the
// terms are formed in one cycle, then a bit-serial square root and a
// bit-serial divider (sign and magnitude, truncating toward zero) finish the
// job, where the original cascaded vendor CORDIC, multiplier and divider
// cores. Negative factors of T (impossible geometry, i.e. noise) are
// clamped to zero, and a result outside 0..1023 is clamped.
//
// Timing: start is a one-cycle pulse with d0..d2 valid; done pulses 63
// cycles later (term cycle, 26 root steps, 32 divide steps and hand-over
// cycles) and d is held until the next start.
module calc_d (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [8:0] d0,
  input  logic [8:0] d1,
  input  logic [8:0] d2,
  output logic [9:0] d,
  output logic       done
);
  import dartboard_pkg::*;

  // ---- term formation (combinational on the inputs) ----
  logic signed [47:0] s0, s1, s2, n_c, a2_c, f1, f2, f3;
  logic        [51:0] t_c;
  always_comb begin
    s0   = 48'(d0);
    s1   = 48'(d1);
    s2   = 48'(d2);
    n_c  = 48'(MIC_2R2) * (s1 + s2) - 2 * s0 * s0 * s0 + s0 * s0 * (s1 + s2)
         + s0 * (s1 * s1 + s2 * s2) - s1 * s1 * s1 - s2 * s2 * s2;
    a2_c = 2 * (-48'(MIC_2R2) + 2 * s0 * s0 + s1 * s1 + s2 * s2 - 2 * s0 * (s1 + s2));
    f1   = 48'(MIC_2R2) - (s0 - s1) * (s0 - s1);
    f2   = 48'(MIC_2R2) - (s0 - s2) * (s0 - s2);
    f3   = 2 * 48'(MIC_2R2) - (s1 - s2) * (s1 - s2);
    if (f1 < 0 || f2 < 0 || f3 < 0) t_c = '0;
    else t_c = 52'(f1[17:0]) * 52'(f2[17:0]) * 52'(f3[18:0]);
  end

  typedef enum logic [1:0] {IDLE, ROOT, DIVIDE} phase_t;
  phase_t phase;

  logic signed [47:0] n_q, a2_q;
  logic        [51:0] t_q;
  logic               sq_start, sq_done, dv_start, dv_done;
  logic        [25:0] sq_root;
  logic        [31:0] num_mag, quo;
  logic        [23:0] den_mag;
  logic               neg_q;

  isqrt_seq #(.W(52)) u_sqrt (
    .clk, .rst, .start(sq_start), .radicand(t_q), .root(sq_root), .done(sq_done)
  );
  udiv_seq #(.N(32), .M(24)) u_div (
    .clk, .rst, .start(dv_start), .dividend(num_mag), .divisor(den_mag),
    .quotient(quo), .done(dv_done)
  );

  logic signed [47:0] num_c;
  assign num_c = n_q - 48'(sq_root);

  always_ff @(posedge clk) begin
    sq_start <= 1'b0;
    dv_start <= 1'b0;
    done     <= 1'b0;
    if (rst) begin
      phase   <= IDLE;
      d       <= '0;
      n_q     <= '0;
      a2_q    <= '0;
      t_q     <= '0;
      num_mag <= '0;
      den_mag <= '0;
      neg_q   <= 1'b0;
    end else begin
      case (phase)
        IDLE: if (start) begin
          n_q      <= n_c;
          a2_q     <= a2_c;
          t_q      <= t_c;
          sq_start <= 1'b1;
          phase    <= ROOT;
        end
        ROOT: if (sq_done) begin
          num_mag  <= 32'(num_c < 0 ? -num_c : num_c);
          den_mag  <= 24'(a2_q < 0 ? -a2_q : a2_q);
          neg_q    <= (num_c < 0) ^ (a2_q < 0);
          dv_start <= 1'b1;
          phase    <= DIVIDE;
        end
        DIVIDE: if (dv_done) begin
          if (neg_q && quo != 0) d <= '0;
          else if (quo > 32'd1023) d <= 10'd1023;
          else d <= quo[9:0];
          done  <= 1'b1;
          phase <= IDLE;
        end
        default: phase <= IDLE;
      endcase
    end
  end
endmodule
