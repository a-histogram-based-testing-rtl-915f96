// tb_href_calculator: requests Href(i) for ascending codes 1..2^N-2 (the
// analyzer's order, which reuses the previous arcsine), then for a few
// out-of-order codes (which need two CORDIC runs), for several offsets and
// amplitudes, and compares each with
//   N_t/pi * [asin((i+1-2^(N-1)-V_o)/A) - asin((i-2^(N-1)-V_o)/A)]
// in real arithmetic. Also checks the two latencies.
module tb_href_calculator;
  import hta_pkg::*;
  localparam int N = 8;
  localparam int L = 15;
  localparam int ITER = 24;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, start = 0, first = 0, busy, done;
  logic [N-1:0] code;
  lsb_t vo, amp;
  logic [31:0] href;
  int checks = 0, failures = 0, n_single = 0, n_double = 0;
  // Fitted offsets and amplitudes tried, in LSB.
  localparam real VOS [3]  = '{0.0, 0.6, -1.3};
  localparam real AMPS [3] = '{128.5, 129.2, 127.9};

  href_calculator #(.ADC_BITS(N), .LOG2_NT(L), .ITER(ITER)) dut (.clk, .rst_n, .start,
    .first, .code, .vo, .amp, .busy, .done, .href);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real casin(input real x);
    if (x > 1.0) x = 1.0;
    if (x < -1.0) x = -1.0;
    return $asin(x);
  endfunction

  task automatic request(input int c, input logic f);
    real vo_r, a_r, exp, got;
    int lat = 0;
    code  <= N'(c);
    first <= f;
    start <= 1;
    @(posedge clk);
    start <= 0;
    while (!done) begin
      @(posedge clk);
      lat++;
    end
    vo_r = real'(vo) / 65536.0;
    a_r  = real'(amp) / 65536.0;
    exp  = real'(1 << L) / PI * (casin((c + 1 - (1 << (N - 1)) - vo_r) / a_r)
                               - casin((c - (1 << (N - 1)) - vo_r) / a_r));
    got  = real'(href) / 65536.0;
    checks++;
    if (got - exp > 0.02 + 2e-4 * exp || exp - got > 0.02 + 2e-4 * exp) begin
      failures++;
      $display("FAIL Href(%0d) vo=%f A=%f: got %f expected %f", c, vo_r, a_r, got, exp);
    end
    // One CORDIC run: ITER+4 cycles; two runs: 2*ITER+6.
    checks++;
    if (lat == ITER + 4) n_single++;
    else if (lat == 2 * ITER + 6) n_double++;
    else begin
      failures++;
      $display("FAIL latency %0d", lat);
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      vo  = lsb_t'($rtoi(VOS[s] * 65536.0));
      amp = lsb_t'($rtoi(AMPS[s] * 65536.0));
      for (int c = 1; c <= (1 << N) - 2; c++) request(c, c == 1);
      request(100, 0);
      request(7, 0);
      request(8, 0);
    end
    checks++;
    if (n_double != 9 || n_single != 3 * 254 - 3 + 3) begin
      failures++;
      $display("FAIL arcsine reuse: %0d single, %0d double runs", n_single, n_double);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
