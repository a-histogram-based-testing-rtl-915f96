// tb_adc_output_analyzer: end-to-end test of the histogram-test analyzer at
// its default size (8-bit ADC, N_t = 32768 samples per pass).
//
// A behavioural 8-bit ADC with random code widths (DNL up to about
// +-0.35 LSB) converts a coherently sampled sine: M = 2048 samples per
// record, J = 19 cycles per record, offset 0.6 LSB, 1.5 LSB overdrive. The
// record is replayed from its start whenever the analyzer signals
// record_start, and the stream has random bubbles. An independent real-number
// model computes the same estimates from the histogram of the record
// (offset and amplitude approximations, exact arcsine reference counts,
// DNL, INL, gain and offset error, Error, SNR_d) and every analyzer output
// is compared with it. The test also checks the cycle count (2^N passes of
// N_t samples plus a bounded arithmetic overhead per code) and counts the
// mechanisms it must exercise: back-pressure stalls, record restarts,
// positive and negative DNL, and the result stream of every inner code.
module tb_adc_output_analyzer;
  import hta_pkg::*;

  localparam int N       = 8;
  localparam int LOG2_NT = 15;
  localparam int NT      = 1 << LOG2_NT;
  localparam int M       = 2048;
  localparam int J       = 19;
  localparam int CODES   = 1 << N;
  localparam real PI     = 3.14159265358979323846;

  localparam real VO_TRUE  = 0.6;
  localparam real VOD_TRUE = 1.5;

  logic clk = 0, rst_n = 0, start = 0;
  lsb_t vod;
  logic in_valid, in_ready, record_start, busy, code_valid, done;
  logic [N-1:0] in_code, cur_code, code_out;
  logic [LOG2_NT:0] hits_out, h_low, h_high;
  logic [31:0] href_out;
  lsb_t dnl_out, inl_out, vo, amp;
  test_result_t result;
  logic signed [15:0] snr_d;

  adc_output_analyzer dut (
    .clk, .rst_n, .start, .vod, .in_valid, .in_ready, .in_code, .record_start,
    .cur_code, .busy, .code_valid, .code_out, .hits_out, .href_out, .dnl_out,
    .inl_out, .done, .h_low, .h_high, .vo, .amp, .result, .snr_d
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  // Watchdog: the full test needs about 2^N * N_t cycles plus bubbles.
  initial begin
    repeat (longint'(CODES) * NT * 2 + 200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real q16(input lsb_t v);
    return real'(v) / 65536.0;
  endfunction

  task automatic check_close(input string what, input real got, input real exp, input real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f (tol %f)", what, got, exp, tol);
    end
  endtask

  // Behavioural ADC: transition levels T[k], code k spans [T[k], T[k+1]).
  real tlev [CODES+1];
  logic [N-1:0] record_codes [M];
  int hist [CODES];

  function automatic logic [N-1:0] quantize(input real v);
    int c = 0;
    for (int k = 1; k < CODES; k++) if (v >= tlev[k]) c = k;
    return N'(c);
  endfunction

  // Reference model values.
  real vo_r, a_r, href_r [CODES], dnl_r [CODES], inl_r [CODES];
  real sum_dnl, sum_sq, g_r, gain_err_r, off_err_r, err_r, snr_r;

  function automatic real clip_asin(input real x);
    if (x > 1.0) x = 1.0;
    if (x < -1.0) x = -1.0;
    return $asin(x);
  endfunction

  // Stimulus: replay the record, random bubbles, restart on record_start.
  int sample_idx = 0;
  int stalls = 0, restarts = 0, passes = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && !in_ready) stalls++;
      if (record_start) begin
        restarts++;
        sample_idx = 0;
      end else if (in_valid && in_ready) begin
        sample_idx = (sample_idx + 1) % M;
      end
      in_valid <= ($urandom_range(0, 9) != 0);
      in_code  <= record_codes[sample_idx];
    end
  end

  // Result stream checks.
  int n_results = 0, dnl_pos = 0, dnl_neg = 0, next_code = 1;
  always @(posedge clk) begin
    if (rst_n && code_valid) begin
      int c;
      c = int'(code_out);
      n_results++;
      checks++;
      if (c != next_code) begin
        failures++;
        $display("FAIL result order: code %0d, expected %0d", c, next_code);
      end
      next_code = c + 1;
      checks++;
      if (int'(hits_out) != hist[c]) begin
        failures++;
        $display("FAIL H(%0d): got %0d expected %0d", c, hits_out, hist[c]);
      end
      check_close($sformatf("Href(%0d)", c), real'(href_out) / 65536.0, href_r[c],
                  0.02 + 2e-4 * href_r[c]);
      check_close($sformatf("DNL(%0d)", c), q16(dnl_out), dnl_r[c], 1e-3);
      check_close($sformatf("INL(%0d)", c), q16(inl_out), inl_r[c], 5e-3);
      if (dnl_out > 0) dnl_pos++;
      if (dnl_out < 0) dnl_neg++;
    end
  end

  initial begin
    real w, v;
    longint t_start, t_end;
    vod = lsb_t'($rtoi(VOD_TRUE * 65536.0));
    in_valid = 0;
    in_code = '0;
    // Code widths 1 + d, d uniform in about +-0.35 LSB.
    tlev[0] = -1.0e9;
    tlev[1] = 1.0;
    for (int k = 1; k < CODES - 1; k++) begin
      w = 1.0 + (real'($urandom_range(0, 700)) - 350.0) / 1000.0;
      tlev[k+1] = tlev[k] + w;
    end
    tlev[CODES] = 1.0e9;
    // Coherently sampled sine spanning the full scale plus the overdrive,
    // centred on the middle of the actual transfer curve plus an offset.
    for (int s = 0; s < M; s++) begin
      v = (tlev[1] + tlev[CODES-1]) / 2.0 + VO_TRUE
        + ((tlev[CODES-1] - tlev[1]) / 2.0 + VOD_TRUE) * $sin(2.0 * PI * J * s / M + 0.1);
      record_codes[s] = quantize(v);
    end
    for (int c = 0; c < CODES; c++) hist[c] = 0;
    for (int s = 0; s < M; s++) hist[record_codes[s]] += NT / M;

    // Reference model of the estimates.
    vo_r = PI * PI / (real'(NT) * real'(NT)) * real'(hist[CODES-1] + hist[0])
         * real'(hist[CODES-1] - hist[0]) * real'(1 << (N - 3));
    a_r  = (real'(CODES / 2 - 1) - vo_r) * (1.0 + 2.0 ** (1 - N)) + VOD_TRUE;
    sum_dnl = 0.0;
    sum_sq  = 0.0;
    for (int c = 1; c < CODES - 1; c++) begin
      href_r[c] = real'(NT) / PI * (clip_asin((c + 1 - CODES / 2 - vo_r) / a_r)
                                  - clip_asin((c - CODES / 2 - vo_r) / a_r));
      dnl_r[c] = real'(hist[c]) / href_r[c] - 1.0;
      inl_r[c] = (c == 1 ? 0.0 : inl_r[c-1]) + dnl_r[c];
      if (c >= 2) sum_dnl += dnl_r[c];
      sum_sq += (dnl_r[c] * dnl_r[c] + 2.0 * dnl_r[c] < 0.0) ?
                -(dnl_r[c] * dnl_r[c] + 2.0 * dnl_r[c]) : (dnl_r[c] * dnl_r[c] + 2.0 * dnl_r[c]);
    end
    g_r        = 1.0 - sum_dnl / real'(CODES - 2);
    gain_err_r = -real'(CODES) / real'(CODES - 2) * sum_dnl;
    off_err_r  = (1.0 + 2.0 ** (1 - N)) * vo_r;
    err_r      = 1.0 + g_r * g_r * sum_sq / real'(CODES - 2);
    snr_r      = -10.0 * $log10(err_r);
    $display("reference: H0=%0d H255=%0d Vo=%f A=%f Error=%f SNRd=%f dB",
             hist[0], hist[CODES-1], vo_r, a_r, err_r, snr_r);

    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    t_start = cycles;
    @(posedge clk iff done);
    t_end = cycles;
    @(posedge clk);

    checks++;
    if (int'(h_low) != hist[0] || int'(h_high) != hist[CODES-1]) begin
      failures++;
      $display("FAIL end codes: got %0d/%0d expected %0d/%0d", h_low, h_high, hist[0], hist[CODES-1]);
    end
    check_close("V_o", q16(vo), vo_r, 1e-3);
    check_close("A", q16(amp), a_r, 1e-3);
    check_close("Offset_Error", q16(result.offset_error), off_err_r, 1e-3);
    check_close("Gain_Error", q16(result.gain_error), gain_err_r, 0.02);
    check_close("G", q16(result.gain), g_r, 1e-4);
    begin
      real dmax, dmin, imax, imin;
      dmax = -1e9; dmin = 1e9; imax = -1e9; imin = 1e9;
      for (int c = 1; c < CODES - 1; c++) begin
        if (dnl_r[c] > dmax) dmax = dnl_r[c];
        if (dnl_r[c] < dmin) dmin = dnl_r[c];
        if (inl_r[c] > imax) imax = inl_r[c];
        if (inl_r[c] < imin) imin = inl_r[c];
      end
      check_close("DNL max", q16(result.dnl_max), dmax, 1e-3);
      check_close("DNL min", q16(result.dnl_min), dmin, 1e-3);
      check_close("DNL_act max", q16(result.dnl_act_max), g_r * (1.0 + dmax) - 1.0, 1e-3);
      check_close("DNL_act min", q16(result.dnl_act_min), g_r * (1.0 + dmin) - 1.0, 1e-3);
      check_close("INL max", q16(result.inl_max), imax, 5e-3);
      check_close("INL min", q16(result.inl_min), imin, 5e-3);
    end
    check_close("Error", q16(result.err_metric), err_r, 1e-3);
    // Table step is 1/32 in Error: at most ~0.07 dB here, plus table rounding.
    check_close("SNR_d", real'(snr_d) / 256.0, snr_r, 0.08);

    // Cycle count: 2^N passes of N_t samples (with ~10% bubbles) plus at
    // most 200 cycles of arithmetic per code.
    checks++;
    if (t_end - t_start < longint'(CODES) * NT || t_end - t_start > longint'(CODES) * (NT + NT / 5 + 200)) begin
      failures++;
      $display("FAIL cycle count %0d", t_end - t_start);
    end

    // Every inner code reported; each mechanism exercised.
    checks++;
    if (n_results != CODES - 2) begin failures++; $display("FAIL %0d results", n_results); end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no back-pressure stall seen"); end
    checks++;
    if (restarts != CODES) begin failures++; $display("FAIL %0d record restarts", restarts); end
    checks++;
    if (dnl_pos == 0 || dnl_neg == 0) begin failures++; $display("FAIL DNL signs %0d/%0d", dnl_pos, dnl_neg); end

    $display("analyzer: Vo=%f A=%f Offset_Error=%f Gain_Error=%f DNL %f..%f INL %f..%f Error=%f SNRd=%f dB",
             q16(vo), q16(amp), q16(result.offset_error), q16(result.gain_error),
             q16(result.dnl_min), q16(result.dnl_max), q16(result.inl_min), q16(result.inl_max),
             q16(result.err_metric), real'(snr_d) / 256.0);
    $display("mechanisms: passes=%0d stalls=%0d restarts=%0d results=%0d dnl+=%0d dnl-=%0d cycles=%0d",
             restarts, stalls, restarts, n_results, dnl_pos, dnl_neg, t_end - t_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
