// tb_cdiv_divider -- self-checking test of the fixed-point divider.
//
// The divider is used at the widths it has in the complex divider (34-bit
// numerator, 32-bit divisor, 16 fraction bits, full-length quotient). It is
// driven with corner numerators and divisors, with random pairs spread over
// all magnitudes, and with a zero divisor. The expected quotient is
// (num * 2^16) / den in 64-bit signed integer arithmetic, which truncates
// toward zero like the divider; for a zero divisor the expected result is
// q = 0 with div_by_zero set. A watchdog ends the run with a failure if it
// does not finish in time.
module tb_cdiv_divider;

  localparam int unsigned NW   = 34;
  localparam int unsigned DW   = 32;
  localparam int unsigned FRAC = 16;
  localparam int unsigned QW   = NW + FRAC;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [NW-1:0] num;
  logic        [DW-1:0] den;
  logic signed [QW-1:0] q;
  logic                 dz;

  cdiv_divider #(.NW(NW), .DW(DW), .FRAC(FRAC)) dut (
    .num(num), .den(den), .q(q), .div_by_zero(dz)
  );

  int checks   = 0;
  int failures = 0;
  int zero_div = 0;

  task automatic check(input longint vn, input longint vd);
    longint r;
    num = NW'(vn);
    den = DW'(vd);
    #1;
    checks++;
    if (den == 0) begin
      zero_div++;
      if (!dz || q != 0) begin
        failures++;
        if (failures <= 20) $display("FAIL %0d / 0: q=%0d dz=%0b", num, q, dz);
      end
    end else begin
      r = (longint'(num) * (longint'(1) << FRAC)) / longint'(den);
      if (dz || longint'(q) != r) begin
        failures++;
        if (failures <= 20) $display("FAIL %0d / %0d: got %0d dz=%0b want %0d", num, den, q, dz, r);
      end
    end
  endtask

  // random value with a random number of significant bits
  function automatic longint rnd(input int unsigned maxbits, input bit sgn);
    int unsigned nb;
    longint v;
    nb = 1 + ($urandom % maxbits);
    v  = longint'({$urandom, $urandom}) & ((longint'(1) << nb) - 1);
    if (sgn && $urandom % 2 == 1) v = -v;
    return v;
  endfunction

  initial begin
    static longint cn[7] = '{-(longint'(1) << 33), -(longint'(1) << 33) + 1, -1, 0, 1,
                      (longint'(1) << 33) - 1, 12345};
    static longint cd[6] = '{1, 2, 3, 65535, longint'(1) << 31, (longint'(1) << 32) - 1};
    foreach (cn[i]) foreach (cd[j]) check(cn[i], cd[j]);
    foreach (cn[i]) check(cn[i], 0);
    repeat (20000) check(rnd(NW - 1, 1'b1), rnd(DW, 1'b0));
    if (zero_div == 0) begin
      failures++;
      $display("FAIL no zero divisor was applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
