// cdiv_top -- complex-number divider y = z1 / z2 with three real
// multipliers instead of four.
//
// With z1 = a + ib, z2 = c + id and y = e + if, the quotient is
//   e = (ac + bd) / R,   f = (ad - bc) / R,   R = c^2 + d^2.
// The numerator pair is the product of the matrix [c d; d -c] with [a b]^T.
// That matrix factors into a 3x2 pre-addition, a diagonal of three
// multiplications and a 2x3 post-addition, much like Gauss's trick for
// complex multiplication:
//   pre-additions   a+b,  c-d,  c+d
//   products        m0 = a*(c-d),  m1 = d*(a+b),  m2 = b*(c+d)
//   post-additions  ac+bd = m0 + m1,   ad-bc = m1 - m2
// Together with the two squarers and the adder that form R, and one divider
// per output, the datapath holds 3 multipliers, 6 adders, 2 squarers and
// 2 dividers, against 4 multipliers and 3 adders for the schoolbook form.
// All of this is combinational (fully parallel); one register stage at the
// output makes the unit usable in a clocked design.
//
// Number format: a, b, c, d are IN_W-bit two's-complement integers. e and f
// are two's-complement fixed-point numbers with FRAC_W fraction bits,
// truncated toward zero, in OUT_W = IN_W + 1 + FRAC_W bits. Every internal
// result is kept at full width, so only the final divisions round. The
// output width always suffices: |e|, |f| <= |z1| / |z2| <= sqrt(2) *
// 2^(IN_W-1) < 2^IN_W for any z2 != 0 with integer parts.
// When c = d = 0 the quotient is undefined: div_by_zero is set and e = f = 0.
//
// Interface and timing: in_valid qualifies a, b, c, d. One clock later
// out_valid is set with e, f and div_by_zero for that input. A new division
// can start every cycle. rst_n is an asynchronous, active-low reset that
// clears the output register.
//
// The factorisation, the operator counts and the wiring follow the
// published structure. Word widths, the fixed-point output format, rounding,
// the divide-by-zero convention and the output register are this design's
// choices. The negation on the (c+d) path, -(c+d), is folded into the
// post-adder that forms ad - bc, which subtracts instead of adding.
module cdiv_top #(
  parameter int unsigned IN_W   = 16,
  parameter int unsigned FRAC_W = 16,
  localparam int unsigned OUT_W = IN_W + 1 + FRAC_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  a,
  input  logic signed [IN_W-1:0]  b,
  input  logic signed [IN_W-1:0]  c,
  input  logic signed [IN_W-1:0]  d,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] e,
  output logic signed [OUT_W-1:0] f,
  output logic                    div_by_zero
);

  localparam int unsigned SW = IN_W + 1;        // pre-addition results
  localparam int unsigned PW = IN_W + SW;       // products
  localparam int unsigned NW = PW + 1;          // numerators
  localparam int unsigned QW = 2 * IN_W - 1;    // squares
  localparam int unsigned RW = 2 * IN_W;        // R = c^2 + d^2 (unsigned)
  localparam int unsigned LW = NW + FRAC_W;     // full-length quotients

  // ---- pre-additions (T3x2 on a, b; diagonal entries from c, d) ----------
  logic signed [SW-1:0] s_ab, s_cmd, s_cpd;

  cdiv_adder #(.W(IN_W), .SUB(1'b0)) u_add_ab  (.x(a), .y(b), .s(s_ab));
  cdiv_adder #(.W(IN_W), .SUB(1'b1)) u_sub_cd  (.x(c), .y(d), .s(s_cmd));
  cdiv_adder #(.W(IN_W), .SUB(1'b0)) u_add_cd  (.x(c), .y(d), .s(s_cpd));

  // ---- three multiplications (diagonal D3) --------------------------------
  logic signed [PW-1:0] m0, m1, m2;

  cdiv_mult #(.WA(IN_W), .WB(SW)) u_mul0 (.x(a), .y(s_cmd), .p(m0));  // a(c-d)
  cdiv_mult #(.WA(IN_W), .WB(SW)) u_mul1 (.x(d), .y(s_ab),  .p(m1));  // d(a+b)
  cdiv_mult #(.WA(IN_W), .WB(SW)) u_mul2 (.x(b), .y(s_cpd), .p(m2));  // b(c+d)

  // ---- post-additions (T2x3) ---------------------------------------------
  logic signed [NW-1:0] num_e, num_f;

  cdiv_adder #(.W(PW), .SUB(1'b0)) u_add_e (.x(m0), .y(m1), .s(num_e));  // ac+bd
  cdiv_adder #(.W(PW), .SUB(1'b1)) u_sub_f (.x(m1), .y(m2), .s(num_f));  // ad-bc

  // ---- denominator R = c^2 + d^2 ------------------------------------------
  logic        [QW-1:0] sq_c, sq_d;
  logic signed [RW:0]   r_sum;
  logic        [RW-1:0] r;

  cdiv_squarer #(.W(IN_W)) u_sq_c (.x(c), .sq(sq_c));
  cdiv_squarer #(.W(IN_W)) u_sq_d (.x(d), .sq(sq_d));

  // the squares are non-negative: zero-extend them into signed operands
  cdiv_adder #(.W(RW)) u_add_r (
    .x({1'b0, sq_c}),
    .y({1'b0, sq_d}),
    .s(r_sum)
  );
  assign r = r_sum[RW-1:0];   // R <= 2^(2*IN_W-1): r_sum[RW] is always 0

  // ---- two divisions (diagonal D2 = R^-1 I) --------------------------------
  logic signed [LW-1:0] q_e, q_f;
  logic                 dz_e, dz_f;

  cdiv_divider #(.NW(NW), .DW(RW), .FRAC(FRAC_W)) u_div_e (
    .num(num_e), .den(r), .q(q_e), .div_by_zero(dz_e)
  );
  cdiv_divider #(.NW(NW), .DW(RW), .FRAC(FRAC_W)) u_div_f (
    .num(num_f), .den(r), .q(q_f), .div_by_zero(dz_f)
  );

  // ---- output register ----------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      e           <= '0;
      f           <= '0;
      div_by_zero <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        e           <= q_e[OUT_W-1:0];
        f           <= q_f[OUT_W-1:0];
        div_by_zero <= dz_e | dz_f;
      end
    end
  end

  // The quotients always fit OUT_W bits (see the range argument above):
  // the bits dropped from the full-length quotients are sign copies.
  a_e_fits : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (q_e[LW-1:OUT_W-1] == '0 || q_e[LW-1:OUT_W-1] == '1));
  a_f_fits : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (q_f[LW-1:OUT_W-1] == '0 || q_f[LW-1:OUT_W-1] == '1));
  // R is a sum of two squares below 2^(2*IN_W-2) each: it never carries out.
  a_r_range : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> r_sum[RW] == 1'b0);

endmodule
