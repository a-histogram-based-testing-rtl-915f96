// tb_dnl_levels: runs the analyzer at its default size on three 8-bit ADC
// models whose DNL lies within +-0.25, +-0.5 and +-1 LSB with 99.7%
// probability (Gaussian code-width errors, sigma = level/3, clipped at the
// level), the three DNL classes used to study the SNR estimate. Each test
// uses a different input offset and overdrive. The record (M = 2048
// samples, J = 19 cycles) is replayed for every pass. For each class the
// per-code DNL and INL, offset, amplitude, gain error, Error and SNR_d are
// compared with a real-number model of the same estimation formulas, and
// the SNR_d is printed. The three tests also run back to back without a
// reset, which checks that a new start clears the previous test's state.
module tb_dnl_levels;
  import hta_pkg::*;

  localparam int N       = 8;
  localparam int LOG2_NT = 15;
  localparam int NT      = 1 << LOG2_NT;
  localparam int M       = 2048;
  localparam int J       = 19;
  localparam int CODES   = 1 << N;
  localparam real PI     = 3.14159265358979323846;

  localparam real LEVELS [3] = '{0.25, 0.5, 1.0};
  localparam real VOS [3]    = '{-0.3, 0.45, 1.1};
  localparam real VODS [3]   = '{1.0, 2.0, 3.0};

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

  initial begin
    repeat (3 * longint'(CODES) * NT * 2 + 200000) @(posedge clk);
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

  function automatic real clip_asin(input real x);
    if (x > 1.0) x = 1.0;
    if (x < -1.0) x = -1.0;
    return $asin(x);
  endfunction

  // Standard normal sample (Box-Muller).
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000001.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  real tlev [CODES+1];
  logic [N-1:0] record_codes [M];
  int hist [CODES];
  real dnl_r [CODES], inl_r [CODES];

  function automatic logic [N-1:0] quantize(input real v);
    int c = 0;
    for (int k = 1; k < CODES; k++) if (v >= tlev[k]) c = k;
    return N'(c);
  endfunction

  // Replay source with bubbles.
  int sample_idx = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (record_start) sample_idx = 0;
      else if (in_valid && in_ready) sample_idx = (sample_idx + 1) % M;
      in_valid <= ($urandom_range(0, 7) != 0);
      in_code  <= record_codes[sample_idx];
    end
  end

  // Per-code result checks.
  int n_results = 0;
  always @(posedge clk) begin
    if (rst_n && code_valid) begin
      int c;
      c = int'(code_out);
      n_results++;
      checks++;
      if (int'(hits_out) != hist[c]) begin
        failures++;
        $display("FAIL H(%0d): got %0d expected %0d", c, hits_out, hist[c]);
      end
      check_close($sformatf("DNL(%0d)", c), q16(dnl_out), dnl_r[c], 2e-3);
      check_close($sformatf("INL(%0d)", c), q16(inl_out), inl_r[c], 1e-2);
    end
  end

  initial begin
    real w, v, vo_r, a_r, href, sum_dnl, sum_sq, x, g_r, err_r, snr_r, dmax, dmin;
    in_valid = 0;
    in_code = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      vod = lsb_t'($rtoi(VODS[t] * 65536.0));
      tlev[0] = -1.0e9;
      tlev[1] = 1.0;
      for (int k = 1; k < CODES - 1; k++) begin
        w = gauss() * LEVELS[t] / 3.0;
        if (w > LEVELS[t]) w = LEVELS[t];
        if (w < -LEVELS[t]) w = -LEVELS[t];
        tlev[k+1] = tlev[k] + 1.0 + w;
      end
      tlev[CODES] = 1.0e9;
      for (int s = 0; s < M; s++) begin
        v = (tlev[1] + tlev[CODES-1]) / 2.0 + VOS[t]
          + ((tlev[CODES-1] - tlev[1]) / 2.0 + VODS[t]) * $sin(2.0 * PI * J * s / M + 0.3);
        record_codes[s] = quantize(v);
      end
      for (int c = 0; c < CODES; c++) hist[c] = 0;
      for (int s = 0; s < M; s++) hist[record_codes[s]] += NT / M;

      vo_r = PI * PI / (real'(NT) * real'(NT)) * real'(hist[CODES-1] + hist[0])
           * real'(hist[CODES-1] - hist[0]) * real'(1 << (N - 3));
      a_r  = (real'(CODES / 2 - 1) - vo_r) * (1.0 + 2.0 ** (1 - N)) + VODS[t];
      sum_dnl = 0.0; sum_sq = 0.0; dmax = -1e9; dmin = 1e9;
      for (int c = 1; c < CODES - 1; c++) begin
        href = real'(NT) / PI * (clip_asin((c + 1 - CODES / 2 - vo_r) / a_r)
                               - clip_asin((c - CODES / 2 - vo_r) / a_r));
        dnl_r[c] = real'(hist[c]) / href - 1.0;
        inl_r[c] = (c == 1 ? 0.0 : inl_r[c-1]) + dnl_r[c];
        if (c >= 2) sum_dnl += dnl_r[c];
        x = dnl_r[c] * dnl_r[c] + 2.0 * dnl_r[c];
        sum_sq += (x < 0.0) ? -x : x;
        if (dnl_r[c] > dmax) dmax = dnl_r[c];
        if (dnl_r[c] < dmin) dmin = dnl_r[c];
      end
      g_r   = 1.0 - sum_dnl / real'(CODES - 2);
      err_r = 1.0 + g_r * g_r * sum_sq / real'(CODES - 2);
      snr_r = -10.0 * $log10(err_r);

      n_results = 0;
      @(posedge clk);
      start <= 1;
      @(posedge clk);
      start <= 0;
      @(posedge clk iff done);
      @(posedge clk);

      check_close("V_o", q16(vo), vo_r, 1e-3);
      check_close("A", q16(amp), a_r, 1e-3);
      check_close("Gain_Error", q16(result.gain_error), -real'(CODES) / real'(CODES - 2) * sum_dnl, 0.03);
      check_close("DNL max", q16(result.dnl_max), dmax, 2e-3);
      check_close("DNL min", q16(result.dnl_min), dmin, 2e-3);
      check_close("Error", q16(result.err_metric), err_r, 2e-3);
      check_close("SNR_d", real'(snr_d) / 256.0, snr_r, 0.1);
      checks++;
      if (n_results != CODES - 2) begin
        failures++;
        $display("FAIL %0d per-code results", n_results);
      end
      $display("DNL class +-%0.2f LSB: DNL %f..%f Gain_Error=%f Error=%f SNR_d=%f dB (model %f dB)",
               LEVELS[t], q16(result.dnl_min), q16(result.dnl_max), q16(result.gain_error),
               q16(result.err_metric), real'(snr_d) / 256.0, snr_r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
