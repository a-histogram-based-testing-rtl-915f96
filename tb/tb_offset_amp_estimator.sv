// tb_offset_amp_estimator: compares the offset and amplitude estimates with
// the same approximations evaluated in real arithmetic,
//   V_o = pi^2/N_t^2 (Hh + Hl)(Hh - Hl) 2^(N-3),
//   A   = (2^(N-1) - 1 - V_o)(1 + 2^(1-N)) + V_OD,
// for random end-code counts around the value a full-scale sine gives
// (N_t/pi * 2^((2-N)/2), about 1304 for N = 8, N_t = 32768), and checks
// that the result comes one cycle after start. Also checks that the
// approximation stays close to the exact cosine fit of the method for a
// small offset.
module tb_offset_amp_estimator;
  import hta_pkg::*;
  localparam int N = 8;
  localparam int L = 15;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, start = 0, done;
  logic [L:0] h_low, h_high;
  lsb_t vod, vo, amp;
  int checks = 0, failures = 0;

  offset_amp_estimator #(.ADC_BITS(N), .LOG2_NT(L)) dut (.clk, .rst_n, .start, .h_low,
    .h_high, .vod, .done, .vo, .amp);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_close(input string what, input real got, input real exp, input real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    real nt, vo_r, a_r, vod_r, c0, c1, vo_exact;
    nt = real'(1 << L);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      h_low  = (L+1)'($urandom_range(600, 2400));
      h_high = (L+1)'($urandom_range(600, 2400));
      if (k == 0) begin h_low = 1304; h_high = 1304; end
      vod_r  = real'($urandom_range(0, 4000)) / 1000.0;
      vod    = lsb_t'($rtoi(vod_r * 65536.0));
      @(posedge clk);
      start <= 1;
      @(posedge clk);
      start <= 0;
      @(posedge clk);
      checks++;
      if (!done) begin
        failures++;
        $display("FAIL done not one cycle after start");
      end
      vo_r = PI * PI / (nt * nt) * real'(h_high + h_low) * real'(int'(h_high) - int'(h_low))
           * real'(1 << (N - 3));
      a_r  = (real'((1 << (N - 1)) - 1) - vo_r) * (1.0 + 2.0 ** (1 - N)) + vod_r;
      check_close("V_o", real'(vo) / 65536.0, vo_r, 1e-4);
      check_close("A", real'(amp) / 65536.0, a_r, 1e-4);
      // Against the exact cosine expression of the fit, for small offsets.
      c0 = $cos(PI * real'(h_low) / nt);
      c1 = $cos(PI * real'(h_high) / nt);
      vo_exact = (c0 - c1) / (c0 + c1) * real'((1 << (N - 1)) - 1);
      if (vo_exact < 1.0 && vo_exact > -1.0) check_close("V_o vs exact", real'(vo) / 65536.0, vo_exact, 0.03);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
