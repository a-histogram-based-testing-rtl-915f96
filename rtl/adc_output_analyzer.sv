// adc_output_analyzer: on-chip analyzer for a single sine-wave histogram
// test of an N-bit ADC.
//
// The ADC under test converts a sine slightly larger than its full scale.
// The analyzer reads its output codes and reports offset error, gain error,
// DNL and INL (extremes and per code) and an estimate of the SNR lost to
// these errors, without storing either the measured or the reference
// histogram:
//   1. counter C1 (code_index_counter) selects code 0, then 2^N-1; counter
//      C2 (hit_counter) counts each one's hits over N_t samples;
//   2. offset_amp_estimator fits the sine offset V_o and amplitude A from
//      these two counts;
//   3. for each inner code i = 1..2^N-2 C2 counts H(i) over N_t samples,
//      href_calculator computes Href(i) with its CORDIC arcsine unit,
//      seq_divider forms H(i)/Href(i) and adc_param_unit accumulates
//      DNL(i) and INL(i);
//   4. adc_param_unit derives gain, gain error, offset error and Error,
//      and snr_lut turns Error into SNR_d.
// This structure follows the method. Doing one pass of N_t samples per code
// (instead of a histogram memory), the end-codes-first order of C1, running
// the per-code arithmetic between passes, and all number formats are this
// implementation's choices.
//
// Interface:
//   start        one-cycle strobe, begins a test (ignored while busy)
//   vod          overdrive V_OD in Q16 LSB, held during the test
//   in_valid/in_ready/in_code  ADC sample stream; a sample is taken when both
//                valid and ready are high. in_ready is low between passes.
//   record_start one-cycle pulse in the cycle before a new pass of N_t
//                samples opens (in_ready rises on the next cycle), so a source
//                replaying a stored record can present its first sample
//   cur_code     code selected by C1
//   code_valid   one-cycle pulse per inner code with code_out, hits_out
//                (H(i)), href_out (Href(i), Q16), dnl_out, inl_out (Q16 LSB)
//   done         one-cycle pulse at the end; h_low, h_high, vo, amp, result
//                and snr_d (signed Q8 dB) then hold the test's results
// Timing: 2^N passes of N_t accepted samples each. After each inner-code
// pass about ITER+4 (Href) + WN+1 (division) + 4 cycles of arithmetic, about
// 85 cycles at the defaults (2*ITER+6 for the Href of code 1); the end-code
// passes add 3 cycles for the sine fit, and the final results take 5.
module adc_output_analyzer
  import hta_pkg::*;
#(
  parameter int ADC_BITS    = 8,
  parameter int LOG2_NT     = 15,
  parameter int CORDIC_ITER = 24,
  // 1: Error includes the G^2 factor; 0: drop it (cheaper, for small gain error)
  parameter bit GAIN_IN_ERROR = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  lsb_t                vod,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [ADC_BITS-1:0] in_code,
  output logic                record_start,
  output logic [ADC_BITS-1:0] cur_code,
  output logic                busy,
  output logic                code_valid,
  output logic [ADC_BITS-1:0] code_out,
  output logic [LOG2_NT:0]    hits_out,
  output logic [31:0]         href_out,
  output lsb_t                dnl_out,
  output lsb_t                inl_out,
  output logic                done,
  output logic [LOG2_NT:0]    h_low,
  output logic [LOG2_NT:0]    h_high,
  output lsb_t                vo,
  output lsb_t                amp,
  output test_result_t        result,
  output logic signed [15:0]  snr_d
);
  // Dividend H(i) * 2^32 gives the ratio H/Href (Href in Q16) in Q16.
  localparam int WN = LOG2_NT + 1 + 32;

  typedef enum logic [3:0] {
    S_IDLE, S_PASS_START, S_PASS_WAIT, S_EST_START, S_EST_WAIT, S_HREF_WAIT,
    S_DIV_WAIT, S_FINISH, S_RES_WAIT, S_LUT_WAIT
  } state_t;
  state_t state;

  // C1
  logic c1_load, c1_advance, is_low_end, is_high_end, is_first, is_last;
  // C2
  logic hc_start, hc_busy, hc_done;
  logic [LOG2_NT:0] hc_hits, h_cur;
  // Estimator
  logic est_start, est_done;
  // Href
  logic href_start, href_busy, href_done;
  logic [31:0] href;
  // Divider
  logic div_start, div_busy, div_done;
  logic [WN-1:0] quotient;
  logic [31:0]   remainder, ratio;
  // Parameters
  logic pu_clear, pu_valid, pu_finish, pu_out_valid, pu_res_valid;
  // LUT
  logic lut_valid;
  logic [6:0] lut_idx;

  code_index_counter #(.ADC_BITS(ADC_BITS)) u_c1 (
    .clk, .rst_n, .load(c1_load), .advance(c1_advance), .code(cur_code),
    .is_low_end, .is_high_end, .is_first, .is_last
  );

  hit_counter #(.ADC_BITS(ADC_BITS), .LOG2_NT(LOG2_NT)) u_c2 (
    .clk, .rst_n, .start(hc_start), .sel_code(cur_code),
    .in_valid, .in_ready, .in_code,
    .busy(hc_busy), .done(hc_done), .hits(hc_hits)
  );

  offset_amp_estimator #(.ADC_BITS(ADC_BITS), .LOG2_NT(LOG2_NT)) u_est (
    .clk, .rst_n, .start(est_start), .h_low, .h_high, .vod,
    .done(est_done), .vo, .amp
  );

  href_calculator #(.ADC_BITS(ADC_BITS), .LOG2_NT(LOG2_NT), .ITER(CORDIC_ITER)) u_href (
    .clk, .rst_n, .start(href_start), .first(is_first), .code(cur_code),
    .vo, .amp, .busy(href_busy), .done(href_done), .href
  );

  seq_divider #(.WN(WN), .WD(32)) u_div (
    .clk, .rst_n, .start(div_start),
    .dividend({h_cur, 32'd0}), .divisor(href),
    .busy(div_busy), .done(div_done), .quotient, .remainder
  );

  // Ratio saturated to 2^15 - 2^-16 (positive signed Q16).
  assign ratio = (quotient > WN'(32'h7fff_ffff)) ? 32'h7fff_ffff : quotient[31:0];

  adc_param_unit #(.ADC_BITS(ADC_BITS), .GAIN_IN_ERROR(GAIN_IN_ERROR)) u_param (
    .clk, .rst_n, .clear(pu_clear), .in_valid(pu_valid), .in_code(cur_code),
    .in_ratio(ratio), .vo, .finish(pu_finish),
    .out_valid(pu_out_valid), .dnl(dnl_out), .inl(inl_out),
    .res_valid(pu_res_valid), .result
  );

  snr_lut #(.ENTRIES(128)) u_lut (
    .clk, .rst_n, .in_valid(pu_res_valid), .err_metric(result.err_metric),
    .out_valid(lut_valid), .idx(lut_idx), .snr_d
  );

  // Controller strobes.
  always_comb begin
    c1_load    = (state == S_IDLE) && start;
    pu_clear   = c1_load;
    hc_start   = (state == S_PASS_START);
    est_start  = (state == S_EST_START);
    href_start = (state == S_PASS_WAIT) && hc_done && !is_low_end && !is_high_end;
    div_start  = (state == S_HREF_WAIT) && href_done;
    pu_valid   = (state == S_DIV_WAIT) && div_done;
    pu_finish  = (state == S_FINISH);
    record_start = hc_start;
    c1_advance = ((state == S_PASS_WAIT) && hc_done && (is_low_end || is_high_end))
              || (pu_valid && !is_last);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      h_low        <= '0;
      h_high       <= '0;
      h_cur        <= '0;
      code_valid   <= 1'b0;
      code_out     <= '0;
      hits_out     <= '0;
      href_out     <= '0;
      done         <= 1'b0;
    end else begin
      code_valid   <= pu_out_valid;
      done         <= 1'b0;
      if (pu_valid) begin
        code_out <= cur_code;
        hits_out <= h_cur;
        href_out <= href;
      end
      unique case (state)
        S_IDLE:       if (start) state <= S_PASS_START;
        S_PASS_START: state <= S_PASS_WAIT;
        S_PASS_WAIT: if (hc_done) begin
          if (is_low_end) begin
            h_low <= hc_hits;
            state <= S_PASS_START;
          end else if (is_high_end) begin
            h_high <= hc_hits;
            state  <= S_EST_START;
          end else begin
            h_cur <= hc_hits;
            state <= S_HREF_WAIT;
          end
        end
        S_EST_START: state <= S_EST_WAIT;
        S_EST_WAIT:  if (est_done) state <= S_PASS_START;
        S_HREF_WAIT: if (href_done) state <= S_DIV_WAIT;
        S_DIV_WAIT:  if (div_done) state <= is_last ? S_FINISH : S_PASS_START;
        S_FINISH:    state <= S_RES_WAIT;
        S_RES_WAIT:  if (pu_res_valid) state <= S_LUT_WAIT;
        S_LUT_WAIT: if (lut_valid) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // Sub-units are only started while idle.
  a_href_idle: assert property (@(posedge clk) disable iff (!rst_n) href_start |-> !href_busy);
  a_div_idle:  assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);
  a_c2_idle:   assert property (@(posedge clk) disable iff (!rst_n) hc_start |-> !hc_busy);
endmodule
