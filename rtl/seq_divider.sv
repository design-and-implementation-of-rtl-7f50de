// seq_divider: bit-serial signed-by-unsigned divider.
//
// Computes quot = dividend / divisor with truncation toward zero, where the
// dividend is signed and the divisor unsigned and non-zero. The magnitude of
// the dividend is divided by restoring long division, one quotient bit per
// clock, and the sign is applied at the end. A start pulse loads the
// operands; done pulses for one clock NW+1 clocks later with quot valid until
// the next start. A start while busy restarts the division. Used by the
// storage unit to turn an accumulated sum into an average (this design's
// choice of divider).
module seq_divider #(
  parameter int unsigned NW = 42,
  parameter int unsigned DW = 14
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [NW-1:0] dividend,
  input  logic [DW-1:0]        divisor,
  output logic                 busy,
  output logic                 done,
  output logic signed [NW-1:0] quot
);
  localparam int unsigned CW = $clog2(NW + 1);

  logic [NW-1:0] q;       // dividend bits shifting out, quotient bits in
  logic [DW-1:0] rem;     // partial remainder, always below d
  logic [DW-1:0] d;
  logic          neg;
  logic [CW-1:0] n;

  logic [DW:0]   shifted;
  logic [DW-1:0] trial;
  logic          fits;

  always_comb begin
    shifted = {rem, q[NW-1]};
    fits    = (shifted >= {1'b0, d});
    trial   = DW'(shifted - {1'b0, d});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      rem  <= '0;
      d    <= '0;
      neg  <= 1'b0;
      n    <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      quot <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q    <= dividend[NW-1] ? NW'(-dividend) : NW'(dividend);
        neg  <= dividend[NW-1];
        d    <= divisor;
        rem  <= '0;
        n    <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        rem <= fits ? trial : shifted[DW-1:0];
        q   <= {q[NW-2:0], fits};
        n <= n + 1'b1;
        if (int'(n) == NW - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          quot <= neg ? -$signed({q[NW-2:0], fits}) : $signed({q[NW-2:0], fits});
        end
      end
    end
  end
endmodule
