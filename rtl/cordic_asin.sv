// cordic_asin: shift-and-add CORDIC evaluation of theta = asin(t / a).
//
// The reference histogram needs inverse sines of (code - offset) / amplitude.
// A division is avoided by the double-rotation arcsine CORDIC: a vector of
// length a starts on the x axis and is rotated towards the target height t.
// Iteration i (i = 1..ITER) rotates it twice by +-atan(2^-i), the sign
// chosen so that y moves towards the target. Two equal micro-rotations grow
// the vector by exactly 1 + 2^-2i, so the target is grown by the same factor
// (c += c >> 2i) with one shift and one add, and the comparison y < c stays
// exact. The accumulated angle z converges to asin(t/a); the double-rotation
// angles from i = 1 sum to 1.92 rad, which covers +-pi/2. |t| > a is
// clamped to +-a (theta = +-pi/2).
//
// The method only asks for a CORDIC-based arcsine; the double-rotation
// variant, ITER = 24 iterations and the 48-bit datapath with 32 fractional
// bits are this implementation's choices.
//
// Interface: t and a in Q16 (a > 0), start one-cycle strobe (ignored while
// busy). theta (Q24 rad) is valid with the one-cycle pulse done.
// Timing: done rises ITER + 1 cycles after start; one iteration per cycle.
module cordic_asin
  import hta_pkg::*;
#(
  parameter int ITER = 24
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  lsb_t t,
  input  lsb_t a,
  output logic busy,
  output logic done,
  output ang_t theta
);
  localparam int W = 48;
  typedef logic signed [W-1:0] wide_t;

  wide_t x, y, c, x1, y1, x2, y2, a_w, t_w, t_clamped;
  ang_t  z;
  logic  [$clog2(ITER+2)-1:0] i;
  logic  dir_pos;

  // Inputs moved to 32 fractional bits.
  assign a_w = wide_t'(a) <<< 16;
  assign t_w = wide_t'(t) <<< 16;
  always_comb begin
    if (t_w > a_w)       t_clamped = a_w;
    else if (t_w < -a_w) t_clamped = -a_w;
    else                 t_clamped = t_w;
  end

  // One iteration: two equal micro-rotations in the chosen direction. In the
  // right half-plane the vector turns towards the target height; if it has
  // swung past +-90 degrees it turns back towards the x axis, which keeps it
  // on the principal branch (|theta| <= pi/2) instead of letting it settle
  // on the mirror solution pi - theta.
  always_comb begin
    if (x >= 0) dir_pos = (y < c);
    else        dir_pos = (y < 0);
    if (dir_pos) begin
      x1 = x - (y >>> i);
      y1 = y + (x >>> i);
      x2 = x1 - (y1 >>> i);
      y2 = y1 + (x1 >>> i);
    end else begin
      x1 = x + (y >>> i);
      y1 = y - (x >>> i);
      x2 = x1 + (y1 >>> i);
      y2 = y1 - (x1 >>> i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      x     <= '0;
      y     <= '0;
      c     <= '0;
      z     <= '0;
      i     <= '0;
      theta <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          x    <= a_w;
          y    <= '0;
          c    <= t_clamped;
          z    <= '0;
          i    <= 1;
        end
      end else begin
        x <= x2;
        y <= y2;
        c <= c + (c >>> (2 * i));
        z <= dir_pos ? z + cordic_angle(int'(i)) : z - cordic_angle(int'(i));
        if (int'(i) == ITER) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          theta <= dir_pos ? z + cordic_angle(int'(i)) : z - cordic_angle(int'(i));
        end else begin
          i <= i + 1'b1;
        end
      end
    end
  end
endmodule
