// cdiv_divider -- signed-by-unsigned fixed-point divider, the final stage of
// the complex-number divider.
//
// Both parts of the quotient share the denominator R = c^2 + d^2, which is
// never negative. Two instances of this unit divide the two numerators by R.
// The unit takes the magnitude of the numerator, appends FRAC zero fraction
// bits, and runs a fully unrolled restoring division: for each dividend bit,
// from the top, the partial remainder is shifted left by one bit, the
// divisor is subtracted when it fits and the quotient bit records whether
// it did. The sign of the numerator is then put back on the quotient. The
// result is the exact quotient num * 2^FRAC / den truncated toward zero.
//
// Interface: num is a signed NW-bit numerator, den an unsigned DW-bit
// divisor. q is the signed quotient with FRAC fraction bits; with the
// default QW = NW+FRAC it holds every possible quotient, a smaller QW keeps
// the low QW bits (the caller must know the quotient fits). When den is
// zero, div_by_zero is set and q is 0.
// Timing: purely combinational, NW+FRAC subtract-and-select rows deep.
//
// The published structure gives only the function of this unit (one divider
// per output); the restoring algorithm, the fixed-point format, truncation
// toward zero and the divide-by-zero convention are this design's choices.
module cdiv_divider #(
  parameter int unsigned NW   = 34,
  parameter int unsigned DW   = 32,
  parameter int unsigned FRAC = 16,
  parameter int unsigned QW   = NW + FRAC
) (
  input  logic signed [NW-1:0] num,
  input  logic        [DW-1:0] den,
  output logic signed [QW-1:0] q,
  output logic                 div_by_zero
);

  localparam int unsigned LW = NW + FRAC;   // dividend and quotient length

  logic [NW-1:0] mag;        // |num|; NW bits hold 2^(NW-1) as unsigned
  logic [LW-1:0] dividend;
  logic [LW-1:0] qmag;
  logic [DW:0]   rem;        // partial remainder, one bit wider than den
  logic signed [LW-1:0] qs;  // signed quotient, full length

  always_comb begin
    mag      = num[NW-1] ? NW'(-num) : NW'(num);
    dividend = {mag, FRAC'(0)};
    rem      = '0;
    qmag     = '0;
    for (int i = int'(LW) - 1; i >= 0; i--) begin
      rem = {rem[DW-1:0], dividend[i]};
      if (rem >= {1'b0, den}) begin
        rem     = rem - {1'b0, den};
        qmag[i] = 1'b1;
      end
    end
    qs          = num[NW-1] ? -qmag : qmag;
    div_by_zero = (den == '0);
    q           = div_by_zero ? '0 : QW'(qs);
  end

endmodule
