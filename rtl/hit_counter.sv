// hit_counter: counter C2 of the ADC output analyzer.
//
// For the code selected by C1, C2 counts how many of the next N_t ADC output
// samples equal that code: the histogram value H(i). A second counter counts
// accepted samples and closes the count after exactly N_t = 2^LOG2_NT of
// them. No histogram memory is needed: each code gets its own pass over a
// record of N_t samples (a replayed stored record, or a fresh coherently
// sampled record, which has the same histogram).
//
// Interface:
//   start       one-cycle strobe: clear both counters and begin a pass
//   sel_code    code to count (held stable during the pass)
//   in_valid/in_ready/in_code  sample stream, one sample per cycle at most;
//               a sample is taken when in_valid && in_ready
//   busy        pass in progress (equals in_ready)
//   done        one-cycle pulse the cycle after the N_t-th sample
//   hits        H(sel_code), valid from done until the next start
// Timing: a pass takes at least N_t cycles; in_ready is low outside passes.
module hit_counter #(
  parameter int ADC_BITS = 8,
  parameter int LOG2_NT  = 15
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [ADC_BITS-1:0] sel_code,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [ADC_BITS-1:0] in_code,
  output logic                busy,
  output logic                done,
  output logic [LOG2_NT:0]    hits
);
  localparam logic [LOG2_NT:0] NT = (LOG2_NT+1)'(1) << LOG2_NT;

  logic [LOG2_NT:0] n_samples;
  logic             take;

  assign in_ready = busy;
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      hits      <= '0;
      n_samples <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy      <= 1'b1;
        hits      <= '0;
        n_samples <= '0;
      end else if (take) begin
        if (in_code == sel_code) hits <= hits + 1'b1;
        n_samples <= n_samples + 1'b1;
        if (n_samples == NT - 1'b1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // A pass never counts more hits than samples.
  a_hits_bounded: assert property (@(posedge clk) disable iff (!rst_n) hits <= n_samples);
endmodule
