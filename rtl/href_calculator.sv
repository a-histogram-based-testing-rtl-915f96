// href_calculator: CORDIC-based reference-histogram calculator.
//
// For the code i named by counter C1 it returns the code count an ideal ADC
// would give for the fitted sine (offset V_o, amplitude A, N_t samples):
//   Href(i) = N_t/pi * [ asin((i+1-2^(N-1)-V_o)/A) - asin((i-2^(N-1)-V_o)/A) ]
// so no reference histogram is stored. Both arcsines come from one
// cordic_asin unit. The upper arcsine of code i is the lower arcsine of code
// i+1, so it is kept: when codes are requested in ascending order only one
// CORDIC run per code is needed. A request for the first code, or for a code
// that does not follow the previous one, runs the CORDIC twice. The
// reuse of the previous arcsine and the fixed-point scaling are choices of
// this implementation; the formula is the method's.
//
// Interface: start (one-cycle strobe, while idle) with code, vo and amp
// (Q16 LSB) held stable until done; first forces both arcsines to be
// computed. href is Q16 (unsigned), valid with the one-cycle pulse done.
// Timing: done follows start after ITER+4 cycles, or 2*ITER+6 when both
// arcsines are computed.
module href_calculator
  import hta_pkg::*;
#(
  parameter int ADC_BITS = 8,
  parameter int LOG2_NT  = 15,
  parameter int ITER     = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                first,
  input  logic [ADC_BITS-1:0] code,
  input  lsb_t                vo,
  input  lsb_t                amp,
  output logic                busy,
  output logic                done,
  output logic [31:0]         href
);
  // Right shift turning (delta-theta in Q24) * (1/pi in Q32) into
  // N_t/pi * delta-theta in Q16.
  localparam int SH = 32 + ANG_FRAC - FRAC - LOG2_NT;

  typedef enum logic [2:0] {IDLE, RUN_LO, WAIT_LO, RUN_HI, WAIT_HI, SCALE} state_t;
  state_t state;

  logic [ADC_BITS-1:0] prev_code;
  logic                prev_ok;
  ang_t                theta_lo, theta_c;
  lsb_t                t_lo, t_cordic;
  logic                c_start, c_busy, c_done;
  logic signed [63:0]  scaled;

  // Lower edge of code i relative to the fitted sine centre, Q16 LSB.
  assign t_lo = (lsb_t'(code) - lsb_t'(1 << (ADC_BITS - 1))) * ONE_Q16 - vo;
  assign t_cordic = (state == RUN_LO) ? t_lo : t_lo + ONE_Q16;
  assign c_start  = (state == RUN_LO) || (state == RUN_HI);

  cordic_asin #(.ITER(ITER)) u_cordic (
    .clk, .rst_n,
    .start(c_start), .t(t_cordic), .a(amp),
    .busy(c_busy), .done(c_done), .theta(theta_c)
  );

  assign scaled = 64'(theta_c - theta_lo) * $signed({32'd0, INV_PI_Q32});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      done      <= 1'b0;
      href      <= '0;
      theta_lo  <= '0;
      prev_code <= '0;
      prev_ok   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          if (first || !prev_ok || code != prev_code + 1'b1) state <= RUN_LO;
          else                                                 state <= RUN_HI;
        end
        RUN_LO:  state <= WAIT_LO;
        WAIT_LO: if (c_done) begin
          theta_lo <= theta_c;
          state    <= RUN_HI;
        end
        RUN_HI:  state <= WAIT_HI;
        WAIT_HI: if (c_done) state <= SCALE;
        SCALE: begin
          // asin is monotonic, so the difference is never negative.
          href      <= scaled[SH +: 32];
          theta_lo  <= theta_c;
          prev_code <= code;
          prev_ok   <= 1'b1;
          done      <= 1'b1;
          state     <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  // The CORDIC is only started while it is idle.
  a_cordic_idle: assert property (@(posedge clk) disable iff (!rst_n) c_start |-> !c_busy);
endmodule
