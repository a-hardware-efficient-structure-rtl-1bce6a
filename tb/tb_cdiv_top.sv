// tb_cdiv_top -- end-to-end self-checking test of the complex-number
// divider at its default sizes (16-bit inputs, 16 fraction bits).
//
// Stimulus: corner operands (most negative and most positive parts, unit
// divisors, purely real and purely imaginary operands), zero divisors, and
// random operands whose magnitudes are spread over all bit lengths. Inputs
// are applied with random gaps, so both back-to-back divisions and idle
// cycles occur, and the reset is asserted once in the middle of the run.
//
// Reference: the schoolbook formula, evaluated in 64-bit integer arithmetic
// independently of the three-multiplier structure:
//   e = (ac + bd) * 2^16 / (c^2 + d^2),  f = (ad - bc) * 2^16 / (c^2 + d^2)
// with division truncating toward zero, and e = f = 0 plus div_by_zero when
// c = d = 0.
//
// Timing: every accepted input must produce out_valid exactly one clock
// later, and out_valid must be low after a cycle without in_valid.
//
// Coverage: the run counts zero divisors, back-to-back inputs, idle cycles,
// resets and quotients in each of the four sign quadrants of (e, f); any of
// these that never happens counts as a failure. A watchdog ends the run
// with a failure if it does not finish in time.
module tb_cdiv_top;

  localparam int unsigned IN_W   = 16;
  localparam int unsigned FRAC_W = 16;
  localparam int unsigned OUT_W  = IN_W + 1 + FRAC_W;
  localparam int          NRAND  = 20000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                    rst_n;
  logic                    in_valid;
  logic signed [IN_W-1:0]  a, b, c, d;
  logic                    out_valid;
  logic signed [OUT_W-1:0] e, f;
  logic                    div_by_zero;

  cdiv_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .a(a), .b(b), .c(c), .d(d),
    .out_valid(out_valid), .e(e), .f(f), .div_by_zero(div_by_zero)
  );

  int checks   = 0;
  int failures = 0;

  // coverage of the behaviours the design has
  int n_zero_div  = 0;
  int n_b2b       = 0;
  int n_idle      = 0;
  int n_reset     = 0;
  int n_quad[4]   = '{0, 0, 0, 0};

  // expected result of the input accepted in the previous cycle
  logic   exp_valid = 1'b0;
  longint exp_e, exp_f;
  logic   exp_dz;
  logic   prev_in_valid = 1'b0;

  function automatic longint rnd_part();
    int unsigned nb;
    longint v;
    nb = 1 + ($urandom % IN_W);
    v  = longint'($urandom) & ((longint'(1) << nb) - 1);
    if ($urandom % 2 == 1) v = -v;
    if (v < -(longint'(1) << (IN_W - 1))) v = -(longint'(1) << (IN_W - 1));
    if (v > (longint'(1) << (IN_W - 1)) - 1) v = (longint'(1) << (IN_W - 1)) - 1;
    return v;
  endfunction

  // check the outputs against the expectation for the current cycle
  task automatic check_outputs();
    checks++;
    if (out_valid !== exp_valid) begin
      failures++;
      if (failures <= 20)
        $display("FAIL %0t out_valid=%0b expected %0b", $time, out_valid, exp_valid);
    end else if (exp_valid) begin
      if (longint'(e) != exp_e || longint'(f) != exp_f || div_by_zero != exp_dz) begin
        failures++;
        if (failures <= 20)
            $display("FAIL %0t e=%0d f=%0d dz=%0b expected e=%0d f=%0d dz=%0b",
                   $time, e, f, div_by_zero, exp_e, exp_f, exp_dz);
      end
      if (!exp_dz) begin
        if (exp_e > 0 && exp_f > 0) n_quad[0]++;
        if (exp_e < 0 && exp_f > 0) n_quad[1]++;
        if (exp_e < 0 && exp_f < 0) n_quad[2]++;
        if (exp_e > 0 && exp_f < 0) n_quad[3]++;
      end
    end
  endtask

  // apply one cycle: drive inputs (or idle), clock, check the result
  task automatic cycle(input logic v, input longint va, input longint vb,
                       input longint vc, input longint vd);
    longint ne, nf, r;
    in_valid = v;
    a = IN_W'(va);
    b = IN_W'(vb);
    c = IN_W'(vc);
    d = IN_W'(vd);
    if (v && prev_in_valid) n_b2b++;
    if (!v) n_idle++;
    @(posedge clk);
    #1;
    // expectation for what was just clocked in
    exp_valid = v;
    if (v) begin
      ne = va * vc + vb * vd;
      nf = va * vd - vb * vc;
      r  = vc * vc + vd * vd;
      exp_dz = (r == 0);
      if (r == 0) begin
        exp_e = 0;
        exp_f = 0;
        n_zero_div++;
      end else begin
        exp_e = (ne * (longint'(1) << FRAC_W)) / r;
        exp_f = (nf * (longint'(1) << FRAC_W)) / r;
      end
    end
    check_outputs();
    prev_in_valid = v;
  endtask

  task automatic divide(input longint va, input longint vb,
                        input longint vc, input longint vd);
    cycle(1'b1, va, vb, vc, vd);
  endtask

  localparam longint MX = (longint'(1) << (IN_W - 1)) - 1;
  localparam longint MN = -(longint'(1) << (IN_W - 1));

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    a = '0; b = '0; c = '0; d = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0) begin
      failures++;
      $display("FAIL out_valid set during reset");
    end
    rst_n = 1'b1;

    // corners
    divide(MN, MN, 1, 0);        // e = a, f = -b = +2^15
    divide(MN, MN, MN, MN);
    divide(MX, MX, MN, MX);
    divide(MN, MX, MX, MN);
    divide(MX, MN, 0, 1);        // divisor i
    divide(3, 4, 3, 4);          // quotient 1
    divide(1, 0, 0, -1);         // 1 / (-i) = i
    divide(1, 1, 3, 0);          // repeating binary fraction
    divide(-1, -1, 3, 0);
    divide(5, -7, 0, 0);         // zero divisor
    cycle(1'b0, 0, 0, 0, 0);
    divide(0, 0, 0, 0);          // 0 / 0
    divide(1, 2, 1, 1);
    divide(-1, 2, 1, 1);
    divide(-1, -2, 1, 1);
    divide(1, -2, 1, 1);

    // random stream with random gaps and occasional zero divisors
    for (int n = 0; n < NRAND; n++) begin
      if ($urandom % 4 == 0) cycle(1'b0, 0, 0, 0, 0);
      if ($urandom % 500 == 0) divide(rnd_part(), rnd_part(), 0, 0);
      else                     divide(rnd_part(), rnd_part(), rnd_part(), rnd_part());
      if (n == NRAND / 2) begin
        // reset in the middle of the run: the output register must clear
        in_valid = 1'b1;
        rst_n    = 1'b0;
        #1;
        checks++;
        if (out_valid !== 1'b0) begin
          failures++;
          $display("FAIL out_valid not cleared by reset");
        end
        @(posedge clk);
        #1;
        rst_n         = 1'b1;
        in_valid      = 1'b0;
        exp_valid     = 1'b0;
        prev_in_valid = 1'b0;
        n_reset++;
      end
    end
    cycle(1'b0, 0, 0, 0, 0);

    // every behaviour must have been exercised
    checks++;
    if (n_zero_div == 0 || n_b2b == 0 || n_idle == 0 || n_reset == 0 ||
        n_quad[0] == 0 || n_quad[1] == 0 || n_quad[2] == 0 || n_quad[3] == 0) begin
      failures++;
      $display("FAIL coverage hole");
    end
    $display("coverage: zero_div=%0d back_to_back=%0d idle=%0d reset=%0d quadrants=%0d/%0d/%0d/%0d",
             n_zero_div, n_b2b, n_idle, n_reset, n_quad[0], n_quad[1], n_quad[2], n_quad[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
