// tb_seq_divider: random and corner divisions checked against the
// simulator's own division, plus the latency (done WN+1 cycles after start)
// and the all-ones quotient on division by zero.
module tb_seq_divider;
  localparam int WN = 48;
  localparam int WD = 32;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [WN-1:0] dividend, quotient;
  logic [WD-1:0] divisor, remainder;
  int checks = 0, failures = 0;

  seq_divider #(.WN(WN), .WD(WD)) dut (.clk, .rst_n, .start, .dividend, .divisor,
    .busy, .done, .quotient, .remainder);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(input logic [WN-1:0] n, input logic [WD-1:0] d);
    int lat = 0;
    dividend <= n;
    divisor  <= d;
    start    <= 1;
    @(posedge clk);
    start <= 0;
    while (!done) begin
      @(posedge clk);
      lat++;
    end
    checks++;
    if (d != 0 && (quotient != n / WN'(d) || remainder != WD'(n % WN'(d)))) begin
      failures++;
      $display("FAIL %0d / %0d: got %0d r %0d", n, d, quotient, remainder);
    end
    if (d == 0 && quotient != '1) begin
      failures++;
      $display("FAIL division by zero gave %0d", quotient);
    end
    // The loop above sees done WN+1 edges after the one that took start.
    checks++;
    if (lat != WN + 1) begin
      failures++;
      $display("FAIL latency %0d", lat);
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    divide(48'd1000 << 32, 32'd80 << 16);
    divide(48'd7, 32'd3);
    divide('1, 32'd1);
    divide('1, '1);
    divide(48'd5, 32'd0);
    divide(48'd0, 32'd9);
    for (int k = 0; k < 200; k++)
      divide({16'($urandom()), 32'($urandom())}, 32'($urandom_range(1, 32'h7fffffff)) >> $urandom_range(0, 24));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
