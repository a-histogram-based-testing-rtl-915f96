// tb_cordic_asin: checks the double-rotation arcsine CORDIC against the real
// arcsine over random and corner arguments (|t/a| up to and beyond 1, the
// amplitudes an 8-bit analyzer sees), and checks that done follows start
// by ITER+1 cycles.
module tb_cordic_asin;
  import hta_pkg::*;

  localparam int ITER = 24;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  lsb_t t, a;
  ang_t theta;
  int checks = 0, failures = 0;

  cordic_asin #(.ITER(ITER)) dut (.clk, .rst_n, .start, .t, .a, .busy, .done, .theta);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real tr, input real ar);
    real exp, got, x, tol;
    int lat;
    t = lsb_t'($rtoi(tr * 65536.0));
    a = lsb_t'($rtoi(ar * 65536.0));
    x = real'(t) / real'(a);
    if (x > 1.0) x = 1.0;
    if (x < -1.0) x = -1.0;
    exp = $asin(x);
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    lat = 1;
    while (!done) begin
      @(posedge clk);
      lat++;
    end
    got = real'(theta) / real'(1 << ANG_FRAC);
    checks++;
    // Close to |t/a| = 1 the arcsine is steep and rounding in the datapath
    // is magnified; allow ten times more there.
    tol = (x > 0.999 || x < -0.999) ? 2e-5 : 2e-6;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL asin(%f/%f): got %.9f expected %.9f", tr, ar, got, exp);
    end
    checks++;
    // start is high in cycle 0 and done in cycle ITER+1; the loop above
    // counts ITER+2 clock edges to observe it.
    if (lat != ITER + 2) begin
      failures++;
      $display("FAIL latency %0d", lat);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0.0, 128.0);
    run(64.0, 128.0);
    run(-64.0, 128.0);
    run(127.0, 128.0);
    run(-127.6, 128.885);
    run(-126.6, 128.885);
    run(128.0, 128.0);
    run(-128.0, 128.0);
    run(140.0, 128.0);   // clamped: pi/2
    run(-3.0, 1.0);      // clamped: -pi/2
    for (int k = 0; k < 300; k++) begin
      real ar, tr;
      ar = 100.0 + real'($urandom_range(0, 40000)) / 1000.0;
      tr = (real'($urandom_range(0, 20000)) / 10000.0 - 1.0) * ar;
      run(tr, ar);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
