// tb_code_index_counter: checks that counter C1 visits 0, 2^N-1, 1, ...,
// 2^N-2 in that order, raises each flag exactly on its code, wraps back to 0
// after the last inner code, restarts on load and holds without advance.
module tb_code_index_counter;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, load = 0, advance = 0;
  logic [N-1:0] code;
  logic is_low_end, is_high_end, is_first, is_last;
  int checks = 0, failures = 0;

  code_index_counter #(.ADC_BITS(N)) dut (.clk, .rst_n, .load, .advance, .code,
    .is_low_end, .is_high_end, .is_first, .is_last);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_code(input int exp);
    checks++;
    if (int'(code) != exp || is_low_end != (exp == 0) || is_high_end != (exp == (1 << N) - 1)
        || is_first != (exp == 1) || is_last != (exp == (1 << N) - 2)) begin
      failures++;
      $display("FAIL code %0d flags %b%b%b%b, expected %0d", code, is_low_end, is_high_end,
               is_first, is_last, exp);
    end
  endtask

  task automatic step(input logic ld, input logic adv);
    load <= ld;
    advance <= adv;
    @(posedge clk);
    load <= 0;
    advance <= 0;
    #1;
  endtask

  initial begin
    int seq [$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 expect_code(0);
    seq.push_back((1 << N) - 1);
    for (int k = 1; k <= (1 << N) - 2; k++) seq.push_back(k);
    seq.push_back(0);
    step(1, 0);
    expect_code(0);
    foreach (seq[k]) begin
      step(0, 1);
      expect_code(seq[k]);
      if (k == 5) begin
        step(0, 0);           // no advance: holds
        expect_code(seq[k]);
      end
    end
    step(0, 1);
    step(0, 1);
    expect_code(1);
    step(1, 1);               // load wins over advance
    expect_code(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
