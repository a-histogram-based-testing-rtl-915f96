// snr_lut: look-up table for the degraded SNR value.
//
// The degraded SNR is SNR_d = -10 log10(Error). Instead of a logarithm unit
// a small table is read: Error is rounded to the nearest multiple of 1/32 in
// [1, 1 + (ENTRIES-1)/32] (values outside are clamped) and entry k holds
//   round(256 * -10 log10(1 + k/32))
// i.e. SNR_d in dB with 8 fractional bits (Q8). For Error = 1.25 it gives
// -248/256 = -0.97 dB. The table's use is the method's; its range, step and
// output format are this implementation's choices (128 entries reach
// Error ~ 4.97, SNR_d ~ -6.96 dB, beyond a DNL of +-1 LSB).
//
// Interface: err_metric (Q16) with in_valid; snr_d (signed Q8 dB) and idx
// are registered and valid with out_valid one cycle later.
module snr_lut
  import hta_pkg::*;
#(
  parameter int ENTRIES = 128
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  lsb_t                       err_metric,
  output logic                       out_valid,
  output logic [$clog2(ENTRIES)-1:0] idx,
  output logic signed [15:0]         snr_d
);
  localparam int IW = $clog2(ENTRIES);

  // The table is filled at elaboration from its formula; it synthesizes to a
  // constant ROM.
  typedef logic signed [15:0] table_t [ENTRIES];
  function automatic table_t build_table();
    table_t tab;
    for (int k = 0; k < ENTRIES; k++)
      tab[k] = 16'($rtoi(-10.0 * $log10(1.0 + real'(k) / 32.0) * 256.0 - 0.5));
    return tab;
  endfunction
  localparam table_t SNR_TABLE = build_table();

  // round((err - 1) * 32) in Q16: add half a step (2^10), drop 11 bits.
  lsb_t            offset_steps;
  logic [IW-1:0]   idx_next;

  always_comb begin
    offset_steps = (err_metric - ONE_Q16 + 32'sd1024) >>> 11;
    if (offset_steps < 0)                    idx_next = '0;
    else if (offset_steps > ENTRIES - 1)     idx_next = IW'(ENTRIES - 1);
    else                                     idx_next = IW'(offset_steps);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      idx       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) idx <= idx_next;
    end
  end

  // Table read from the registered index.
  assign snr_d = SNR_TABLE[idx];
endmodule
