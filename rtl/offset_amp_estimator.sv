// offset_amp_estimator: fits the input sine from the two end-code counts.
//
// The exact fit needs cosines of pi*H/N_t. Because an end code of an ADC of
// 8 bits or more is hit by a fraction of at most about 1/8 of pi of the
// samples, cos x is replaced by 1 - x^2/2, which gives
//   V_o ~ (pi^2/N_t^2) * (H(2^N-1) + H(0)) * (H(2^N-1) - H(0)) * 2^(N-3)
//   A   ~ (2^(N-1) - 1 - V_o) * (1 + 2^(1-N)) + V_OD
// With N_t a power of two the division by N_t^2 is a shift, so the whole
// estimate is two squarers, one constant multiplier (pi^2), shifts and
// adders. Both formulas are the method's; rounding the V_o shift to nearest
// and taking the overdrive V_OD as a run-time input are choices of this
// implementation.
//
// Interface: h_low = H(0), h_high = H(2^N-1), vod = overdrive in Q16 LSB.
// start is a one-cycle strobe; vo and amp (Q16 LSB) are registered and
// valid with the one-cycle pulse done, the cycle after start.
module offset_amp_estimator
  import hta_pkg::*;
#(
  parameter int ADC_BITS = 8,
  parameter int LOG2_NT  = 15
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [LOG2_NT:0] h_low,
  input  logic [LOG2_NT:0] h_high,
  input  lsb_t             vod,
  output logic             done,
  output lsb_t             vo,
  output lsb_t             amp
);
  // Right shift that turns pi^2 * (Hh^2 - Hl^2) into V_o in Q16:
  // divide by N_t^2, multiply by 2^(N-3).
  localparam int SH = 2 * LOG2_NT - (ADC_BITS - 3);
  localparam logic signed [63:0] HALF_LSB_MID = 64'sd1 <<< (SH - 1);
  // 2^(N-1) - 1 in Q16.
  localparam lsb_t HALF_SCALE = lsb_t'(((64'sd1 <<< (ADC_BITS - 1)) - 64'sd1) <<< FRAC);

  logic signed [63:0] sq_diff, prod;
  lsb_t               vo_next, base, amp_next;

  always_comb begin
    sq_diff  = 64'(h_high) * 64'(h_high) - 64'(h_low) * 64'(h_low);
    prod     = sq_diff * $signed({32'd0, PI2_Q16});
    vo_next  = lsb_t'((prod + HALF_LSB_MID) >>> SH);
    base     = HALF_SCALE - vo_next;
    amp_next = base + (base >>> (ADC_BITS - 1)) + vod;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      vo   <= '0;
      amp  <= '0;
    end else begin
      done <= start;
      if (start) begin
        vo  <= vo_next;
        amp <= amp_next;
      end
    end
  end

  initial begin
    assert (SH >= 1) else $error("N_t too small for this ADC resolution");
  end
endmodule
