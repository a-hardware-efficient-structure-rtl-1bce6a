// cdiv_mult -- signed binary multiplier, three of which carry all the
// multiplications of the complex-number divider.
//
// The structure replaces the four products of the schoolbook formula
// (ac, bd, ad, bc) by three: a*(c-d), d*(a+b) and b*(c+d). Each is formed by
// one instance of this unit. The unit forms the exact product of two
// two's-complement operands of independent widths; how the product is built
// (array, Booth, DSP block) is left to synthesis.
//
// Interface: x (WA bits) and y (WB bits) are signed operands, p is the exact
// (WA+WB)-bit signed product.
// Timing: purely combinational.
module cdiv_mult #(
  parameter int unsigned WA = 17,
  parameter int unsigned WB = 17
) (
  input  logic signed [WA-1:0]    x,
  input  logic signed [WB-1:0]    y,
  output logic signed [WA+WB-1:0] p
);

  logic signed [WA+WB-1:0] xe, ye;

  always_comb begin
    xe = (WA+WB)'(x);   // sign-extending casts: the operands are signed
    ye = (WA+WB)'(y);
    p  = xe * ye;
  end

endmodule
