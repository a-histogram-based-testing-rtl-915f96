// adc_param_unit: turns per-code count ratios into the ADC's static and
// estimated dynamic parameters.
//
// For every inner code i = 1..2^N-2 it receives r(i) = H(i)/Href(i) and
//   - forms DNL(i) = r(i) - 1 and the running INL(i) = sum_{k<=i} DNL(k),
//     tracking the largest and smallest of each;
//   - sums DNL(i) over i = 2..2^N-2 (for the gain estimate);
//   - sums |DNL^2 + 2 DNL| = |r^2 - 1| over all inner codes.
// On finish it computes, with D = 2^N - 2,
//   G            = 1 - sum(DNL)/D
//   Gain_Error   = -(2^N/D) * sum(DNL)
//   DNL_act      = G*(1 + DNL) - 1 (gain-corrected DNL, extremes only)
//   Offset_Error = (1 + 2^(1-N)) * V_o
//   Error        = 1 + G^2 * sum|DNL^2 + 2 DNL| / D
// (with GAIN_IN_ERROR = 0 the G^2 factor is left out, the cheaper form the
// method allows when the gain error is small; it saves two multipliers)
// Error is the argument of -10 log10() for the degraded SNR. Because G^2 is
// positive it can be taken out of the absolute value, so the sum is formed
// without knowing G yet and the gain is applied once at the end, so keeping
// the G^2 term (the default) costs only two multiplications. Division by the constant D is a
// multiplication by its Q32 reciprocal. The formulas are the method's; the
// factoring of G^2, the number formats and the reciprocal are this
// implementation's.
//
// Interface: clear (one-cycle) starts a new test. in_valid with in_code and
// in_ratio (unsigned Q16) presents one code; dnl and inl for it are
// registered and valid with out_valid one cycle later. finish (one-cycle,
// after the last code) yields result with res_valid two cycles later.
module adc_param_unit
  import hta_pkg::*;
#(
  parameter int ADC_BITS      = 8,
  parameter bit GAIN_IN_ERROR = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                in_valid,
  input  logic [ADC_BITS-1:0] in_code,
  input  logic [31:0]         in_ratio,
  input  lsb_t                vo,
  input  logic                finish,
  output logic                out_valid,
  output lsb_t                dnl,
  output lsb_t                inl,
  output logic                res_valid,
  output test_result_t        result
);
  localparam longint D = (64'sd1 <<< ADC_BITS) - 2;
  // round(2^32 / D)
  localparam logic signed [63:0] RECIP = ((64'sd1 <<< 32) + D / 2) / D;

  lsb_t               dnl_now, inl_now;
  logic signed [63:0] ratio_sq, excess;
  logic signed [47:0] dnl_sum, sq_sum;
  lsb_t               dnl_max, dnl_min, inl_max, inl_min;
  logic               fin_d1;
  logic signed [63:0] mean_dnl, mean_sq, gain;

  always_comb begin
    dnl_now  = lsb_t'($signed({1'b0, in_ratio})) - ONE_Q16;
    inl_now  = inl + dnl_now;
    ratio_sq = 64'($unsigned(in_ratio)) * 64'($unsigned(in_ratio));   // Q32
    excess   = (ratio_sq >>> FRAC) - 64'(ONE_Q16);                   // Q16
    if (excess < 0) excess = -excess;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      dnl       <= '0;
      inl       <= '0;
      dnl_sum   <= '0;
      sq_sum    <= '0;
      dnl_max   <= '0;
      dnl_min   <= '0;
      inl_max   <= '0;
      inl_min   <= '0;
      fin_d1    <= 1'b0;
      mean_dnl  <= '0;
      mean_sq   <= '0;
      gain      <= '0;
      res_valid <= 1'b0;
      result    <= '0;
    end else begin
      out_valid <= in_valid && !clear;
      fin_d1    <= finish;
      res_valid <= fin_d1;
      if (clear) begin
        inl       <= '0;
        dnl       <= '0;
        dnl_sum   <= '0;
        sq_sum    <= '0;
        dnl_max   <= 32'sh8000_0000;
        dnl_min   <= 32'sh7fff_ffff;
        inl_max   <= 32'sh8000_0000;
        inl_min   <= 32'sh7fff_ffff;
      end else if (in_valid) begin
        dnl <= dnl_now;
        inl <= inl_now;
        if (in_code != ADC_BITS'(1)) dnl_sum <= dnl_sum + 48'(dnl_now);
        sq_sum <= sq_sum + 48'(excess);
        if (dnl_now > dnl_max) dnl_max <= dnl_now;
        if (dnl_now < dnl_min) dnl_min <= dnl_now;
        if (inl_now > inl_max) inl_max <= inl_now;
        if (inl_now < inl_min) inl_min <= inl_now;
      end
      // Final stage 1: averages and gain.
      if (finish) begin
        mean_dnl <= (64'(dnl_sum) * RECIP) >>> 32;
        mean_sq  <= (64'(sq_sum) * RECIP) >>> 32;
        gain     <= 64'(ONE_Q16) - ((64'(dnl_sum) * RECIP) >>> 32);
      end
      // Final stage 2: the reported parameters.
      if (fin_d1) begin
        result.offset_error <= vo + (vo >>> (ADC_BITS - 1));
        result.gain_error   <= lsb_t'(-(mean_dnl <<< ADC_BITS));
        result.gain         <= lsb_t'(gain);
        result.dnl_max      <= dnl_max;
        result.dnl_min      <= dnl_min;
        // G > 0, so the extremes of G*(1+DNL)-1 are those of DNL.
        result.dnl_act_max  <= lsb_t'(((gain * (64'(ONE_Q16) + 64'(dnl_max))) >>> FRAC) - 64'(ONE_Q16));
        result.dnl_act_min  <= lsb_t'(((gain * (64'(ONE_Q16) + 64'(dnl_min))) >>> FRAC) - 64'(ONE_Q16));
        result.inl_max      <= inl_max;
        result.inl_min      <= inl_min;
        if (GAIN_IN_ERROR)
          result.err_metric <= lsb_t'(64'(ONE_Q16) + ((((gain * gain) >>> FRAC) * mean_sq) >>> FRAC));
        else
          result.err_metric <= lsb_t'(64'(ONE_Q16) + mean_sq);
      end
    end
  end
endmodule
