// cdiv_adder -- signed adder / subtractor used for every addition of the
// complex-number divider.
//
// The divider structure needs six additions: the pre-additions a+b, c-d and
// c+d that build the inputs of the three multipliers, the two post-additions
// that combine the three products into the numerators of the real and
// imaginary quotient, and the addition c^2+d^2 that forms the common
// denominator R. One parameterised unit covers all of them: SUB selects
// x+y (0) or x-y (1) at elaboration time.
//
// Interface: x and y are W-bit two's-complement operands, s is the exact
// (W+1)-bit result, so no addition in the datapath can overflow.
// Timing: purely combinational.
//
// The number of adders and their places follow the published structure;
// the operand format (two's complement) and the one-bit growth of the
// result are choices of this design.
module cdiv_adder #(
  parameter int unsigned W   = 17,
  parameter bit          SUB = 1'b0
) (
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] y,
  output logic signed [W:0]   s
);

  logic signed [W:0] xe, ye;

  always_comb begin
    xe = {x[W-1], x};
    ye = {y[W-1], y};
    if (SUB) s = xe - ye;
    else     s = xe + ye;
  end

endmodule
