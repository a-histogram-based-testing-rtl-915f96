// tb_hit_counter: feeds counter C2 random code streams with random bubbles
// and checks that each pass accepts exactly N_t samples, counts the hits of
// the selected code exactly, pulses done once, and drops in_ready between
// passes. Runs at N_t = 2^10 to stay short.
module tb_hit_counter;
  localparam int N = 8;
  localparam int L = 10;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, in_ready, busy, done;
  logic [N-1:0] sel_code, in_code;
  logic [L:0] hits;
  int checks = 0, failures = 0;

  hit_counter #(.ADC_BITS(N), .LOG2_NT(L)) dut (.clk, .rst_n, .start, .sel_code,
    .in_valid, .in_ready, .in_code, .busy, .done, .hits);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int taken = 0, expected_hits = 0;
  always @(posedge clk) begin
    if (in_valid && in_ready) begin
      taken++;
      if (in_code == sel_code) expected_hits++;
    end
    in_valid <= ($urandom_range(0, 3) != 0);
    // Codes near the selected one, so hits are frequent.
    in_code  <= sel_code + N'($urandom_range(0, 4)) - N'(2);
  end

  initial begin
    int lat;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 6; p++) begin
      sel_code = N'($urandom_range(0, 255));
      if (p == 0) sel_code = 0;
      if (p == 1) sel_code = 255;
      @(posedge clk);
      start <= 1;
      @(posedge clk);
      start <= 0;
      taken = 0;
      expected_hits = 0;
      lat = 0;
      while (!done) begin
        @(posedge clk);
        lat++;
      end
      checks++;
      if (taken != (1 << L)) begin
        failures++;
        $display("FAIL pass %0d took %0d samples", p, taken);
      end
      checks++;
      if (int'(hits) != expected_hits) begin
        failures++;
        $display("FAIL pass %0d hits %0d expected %0d", p, hits, expected_hits);
      end
      checks++;
      if (lat < (1 << L)) begin
        failures++;
        $display("FAIL pass %0d finished in %0d cycles", p, lat);
      end
      repeat (3) @(posedge clk);
      checks++;
      if (in_ready || done || busy) begin
        failures++;
        $display("FAIL still ready/busy after the pass");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
