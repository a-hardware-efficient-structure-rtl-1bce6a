// cdiv_squarer -- squaring unit for the denominator R = c^2 + d^2.
//
// Two instances square the real and imaginary parts of the divisor. A
// squarer is cheaper than a general multiplier because its partial-product
// matrix is symmetric: every cross term x_i*x_j (i != j) appears twice, so
// it is added once at weight 2^(i+j+1), and every diagonal term x_i*x_i
// reduces to x_i. This unit squares the magnitude of the operand that way
// and needs no sign handling afterwards, since a square is never negative.
//
// Interface: x is a W-bit two's-complement operand; sq is x*x as an
// unsigned (2W-1)-bit number (the largest square, (-2^(W-1))^2 = 2^(2W-2),
// just fits).
// Timing: purely combinational.
//
// That the denominator uses squarers follows the published structure; the
// folded partial-product scheme is this design's choice.
module cdiv_squarer #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] x,
  output logic [2*W-2:0]      sq
);

  logic [W-1:0]   m;     // |x|; W bits hold 2^(W-1) as unsigned
  logic [2*W-1:0] acc, row;

  always_comb begin
    m   = x[W-1] ? W'(-x) : W'(x);
    acc = '0;
    row = '0;
    for (int i = 0; i < int'(W); i++) begin
      // row i: the diagonal term x_i*x_i = x_i at weight 2^(2i), and the
      // cross terms x_i*x_j (j > i), doubled, at weights 2^(i+j+1); the
      // lowest cross weight 2^(2i+2) lies above the diagonal bit.
      if (m[i]) begin
        row = (((2*W)'(m) >> (i + 1)) << (2*i + 2)) | ((2*W)'(1) << (2*i));
        acc = acc + row;
      end
    end
    sq = acc[2*W-2:0];
  end

endmodule
