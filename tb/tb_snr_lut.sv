// tb_snr_lut: sweeps Error over and beyond the table's range and checks the
// degraded SNR against -10 log10(Error) evaluated at the rounded table
// point, the clamping at both ends, the method's example (Error = 1.25
// gives -0.97 dB) and the one-cycle latency.
module tb_snr_lut;
  import hta_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  lsb_t err_metric;
  logic [6:0] idx;
  logic signed [15:0] snr_d;
  int checks = 0, failures = 0;

  snr_lut dut (.clk, .rst_n, .in_valid, .err_metric, .out_valid, .idx, .snr_d);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic lookup(input real e);
    real ec, exp;
    err_metric <= lsb_t'($rtoi(e * 65536.0));
    in_valid   <= 1;
    @(posedge clk);
    in_valid <= 0;
    @(posedge clk);
    ec = $floor((e - 1.0) * 32.0 + 0.5);
    if (ec < 0.0) ec = 0.0;
    if (ec > 127.0) ec = 127.0;
    exp = -10.0 * $log10(1.0 + ec / 32.0);
    checks++;
    if (!out_valid || int'(idx) != $rtoi(ec)) begin
      failures++;
      $display("FAIL Error %f: index %0d expected %0d", e, idx, $rtoi(ec));
    end
    checks++;
    if (real'(snr_d) / 256.0 - exp > 0.003 || exp - real'(snr_d) / 256.0 > 0.003) begin
      failures++;
      $display("FAIL Error %f: SNR_d %f expected %f", e, real'(snr_d) / 256.0, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    lookup(1.25);
    checks++;
    if (snr_d != -16'sd248) begin
      failures++;
      $display("FAIL example: Error 1.25 gave %0d/256 dB", snr_d);
    end
    lookup(1.0);
    lookup(0.9);
    lookup(6.0);
    for (int k = 0; k < 300; k++) lookup(1.0 + real'($urandom_range(0, 4000)) / 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
