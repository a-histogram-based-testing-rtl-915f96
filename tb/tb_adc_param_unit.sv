// tb_adc_param_unit: feeds random count ratios r(i) = H(i)/Href(i) for the
// inner codes of an 8-bit ADC (with gaps between codes, as in the analyzer)
// and checks per-code DNL and INL, then the final gain, gain error, offset
// error, DNL/INL extremes and Error against real-number evaluations of the
// method's formulas. Two tests: one near-ideal ADC, one with a large gain
// error, which exercises the G^2 factor of Error. A second instance built
// without the G^2 factor is checked on the same inputs. Also checks that the
// result arrives two cycles after finish.
module tb_adc_param_unit;
  import hta_pkg::*;
  localparam int N = 8;
  localparam int CODES = 1 << N;

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, finish = 0;
  logic [N-1:0] in_code;
  logic [31:0] in_ratio;
  lsb_t vo, dnl, inl;
  logic out_valid, res_valid;
  test_result_t result;
  int checks = 0, failures = 0;

  adc_param_unit #(.ADC_BITS(N)) dut (.clk, .rst_n, .clear, .in_valid, .in_code, .in_ratio,
    .vo, .finish, .out_valid, .dnl, .inl, .res_valid, .result);

  // Same inputs, Error without the G^2 factor.
  test_result_t result_nog;
  logic out_valid_nog, res_valid_nog;
  lsb_t dnl_nog, inl_nog;
  adc_param_unit #(.ADC_BITS(N), .GAIN_IN_ERROR(1'b0)) dut_nog (.clk, .rst_n, .clear,
    .in_valid, .in_code, .in_ratio, .vo, .finish, .out_valid(out_valid_nog), .dnl(dnl_nog),
    .inl(inl_nog), .res_valid(res_valid_nog), .result(result_nog));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real q(input lsb_t v);
    return real'(v) / 65536.0;
  endfunction

  task automatic check_close(input string what, input real got, input real exp, input real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  task automatic run_test(input real bias, input real spread, input real vo_r);
    real d, inl_r, sum_d, sum_sq, dmax, dmin, imax, imin, g, x;
    logic [31:0] r_q;
    inl_r = 0.0; sum_d = 0.0; sum_sq = 0.0;
    dmax = -1e9; dmin = 1e9; imax = -1e9; imin = 1e9;
    vo = lsb_t'($rtoi(vo_r * 65536.0));
    clear <= 1;
    @(posedge clk);
    clear <= 0;
    for (int c = 1; c <= CODES - 2; c++) begin
      r_q = 32'($rtoi((1.0 + bias + spread * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0)) * 65536.0));
      d = real'(r_q) / 65536.0 - 1.0;
      inl_r += d;
      if (c >= 2) sum_d += d;
      x = d * d + 2.0 * d;
      sum_sq += (x < 0.0) ? -x : x;
      if (d > dmax) dmax = d;
      if (d < dmin) dmin = d;
      if (inl_r > imax) imax = inl_r;
      if (inl_r < imin) imin = inl_r;
      in_valid <= 1;
      in_code  <= N'(c);
      in_ratio <= r_q;
      @(posedge clk);
      in_valid <= 0;
      @(posedge clk);
      checks++;
      if (!out_valid) begin
        failures++;
        $display("FAIL out_valid missing for code %0d", c);
      end
      check_close($sformatf("DNL(%0d)", c), q(dnl), d, 1e-6);
      check_close($sformatf("INL(%0d)", c), q(inl), inl_r, 1e-6);
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    finish <= 1;
    @(posedge clk);
    finish <= 0;
    @(posedge clk);
    @(posedge clk);
    checks++;
    if (!res_valid) begin
      failures++;
      $display("FAIL res_valid not two cycles after finish");
    end
    g = 1.0 - sum_d / real'(CODES - 2);
    check_close("G", q(result.gain), g, 1e-4);
    check_close("Gain_Error", q(result.gain_error), -real'(CODES) / real'(CODES - 2) * sum_d, 0.005);
    check_close("Offset_Error", q(result.offset_error), (1.0 + 2.0 ** (1 - N)) * vo_r, 1e-4);
    check_close("DNL max", q(result.dnl_max), dmax, 1e-6);
    check_close("DNL min", q(result.dnl_min), dmin, 1e-6);
    check_close("DNL_act max", q(result.dnl_act_max), g * (1.0 + dmax) - 1.0, 1e-4);
    check_close("DNL_act min", q(result.dnl_act_min), g * (1.0 + dmin) - 1.0, 1e-4);
    check_close("INL max", q(result.inl_max), imax, 1e-6);
    check_close("INL min", q(result.inl_min), imin, 1e-6);
    check_close("Error", q(result.err_metric), 1.0 + g * g * sum_sq / real'(CODES - 2), 5e-4);
    check_close("Error without G", q(result_nog.err_metric), 1.0 + sum_sq / real'(CODES - 2), 5e-4);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run_test(0.0, 0.3, 0.6);
    run_test(-0.04, 0.5, -1.25);   // G about 1.04
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
