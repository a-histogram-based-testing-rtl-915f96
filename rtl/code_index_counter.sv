// code_index_counter: counter C1 of the ADC output analyzer.
//
// C1 names the ADC code i whose hits are being counted and whose reference
// count is being computed. The analyzer first needs the two end codes, from
// which it fits the input sine, so C1 runs in the order
//   0, 2^N-1, 1, 2, ..., 2^N-2
// ("load" restarts it at 0, "advance" steps it once). The end-code-first
// ordering is this implementation's choice; the method only says that C1
// indexes the code under analysis and drives the Href(i) calculator.
//
// Interface: load and advance are single-cycle strobes (load wins).
//   code       current code i
//   is_low_end code == 0
//   is_high_end code == 2^N-1
//   is_first   code == 1 (first inner code)
//   is_last    code == 2^N-2 (last inner code; advancing from here wraps to 0)
// Timing: the new code is visible the cycle after the strobe.
module code_index_counter #(
  parameter int ADC_BITS = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic                advance,
  output logic [ADC_BITS-1:0] code,
  output logic                is_low_end,
  output logic                is_high_end,
  output logic                is_first,
  output logic                is_last
);
  localparam logic [ADC_BITS-1:0] TOP_CODE = '1;
  localparam logic [ADC_BITS-1:0] LAST_INNER = TOP_CODE - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code <= '0;
    end else if (load) begin
      code <= '0;
    end else if (advance) begin
      unique case (code)
        '0:         code <= TOP_CODE;
        TOP_CODE:   code <= ADC_BITS'(1);
        LAST_INNER: code <= '0;
        default:    code <= code + 1'b1;
      endcase
    end
  end

  assign is_low_end  = (code == '0);
  assign is_high_end = (code == TOP_CODE);
  assign is_first    = (code == ADC_BITS'(1));
  assign is_last     = (code == LAST_INNER);
endmodule
