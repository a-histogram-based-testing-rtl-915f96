// seq_divider: radix-2 restoring divider, one quotient bit per cycle.
//
// The analyzer divides the measured code count H(i) by the reference count
// Href(i) once per code, so a small sequential divider is enough. Each cycle
// shifts the next dividend bit into the partial remainder and subtracts the
// divisor when it fits. The method asks only for basic arithmetic units;
// the restoring algorithm is this implementation's choice.
//
// Interface: start (one-cycle strobe, while idle) latches dividend and
// divisor; quotient and remainder are valid with the one-cycle pulse done.
// Division by zero returns an all-ones quotient (the remainder is then
// meaningless). Timing: done rises WN + 1 cycles after start.
module seq_divider #(
  parameter int WN = 48,
  parameter int WD = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [WN-1:0] dividend,
  input  logic [WD-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [WN-1:0] quotient,
  output logic [WD-1:0] remainder
);
  logic [WN-1:0]          q;
  logic [WD:0]            r, r_shift, r_sub;
  logic [WD-1:0]          d;
  logic [$clog2(WN+1)-1:0] n;

  always_comb begin
    r_shift = {r[WD-1:0], q[WN-1]};
    r_sub   = r_shift - {1'b0, d};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      q         <= '0;
      r         <= '0;
      d         <= '0;
      n         <= '0;
      quotient  <= '0;
      remainder <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          q    <= dividend;
          r    <= '0;
          d    <= divisor;
          n    <= '0;
        end
      end else begin
        // r_sub[WD] set means the divisor did not fit.
        if (!r_sub[WD]) begin
          r <= r_sub;
          q <= {q[WN-2:0], 1'b1};
        end else begin
          r <= r_shift;
          q <= {q[WN-2:0], 1'b0};
        end
        if (int'(n) == WN - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          quotient  <= r_sub[WD] ? {q[WN-2:0], 1'b0} : {q[WN-2:0], 1'b1};
          remainder <= r_sub[WD] ? r_shift[WD-1:0] : r_sub[WD-1:0];
        end
        n <= n + 1'b1;
      end
    end
  end
endmodule
