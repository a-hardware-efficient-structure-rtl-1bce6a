// tb_cdiv_mult -- self-checking test of the signed multiplier.
//
// The multiplier is instantiated with the operand widths it has in the
// divider (16 x 17 bits) and driven with corner values (most negative,
// -1, 0, 1, most positive of each operand) and random operands. The
// expected products come from 64-bit integer arithmetic. A watchdog ends
// the run with a failure if it does not finish in time.
module tb_cdiv_mult;

  localparam int unsigned WA = 16;
  localparam int unsigned WB = 17;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [WA-1:0]    x;
  logic signed [WB-1:0]    y;
  logic signed [WA+WB-1:0] p;

  cdiv_mult #(.WA(WA), .WB(WB)) dut (.x(x), .y(y), .p(p));

  int checks   = 0;
  int failures = 0;

  task automatic check(input longint vx, input longint vy);
    longint r;
    x = WA'(vx);
    y = WB'(vy);
    #1;
    r = longint'(x) * longint'(y);
    checks++;
    if (longint'(p) != r) begin
      failures++;
      if (failures <= 20) $display("FAIL %0d * %0d: got %0d want %0d", x, y, p, r);
    end
  endtask

  initial begin
    static longint ca[5] = '{-32768, -1, 0, 1, 32767};
    static longint cb[5] = '{-65536, -1, 0, 1, 65535};
    foreach (ca[i]) foreach (cb[j]) check(ca[i], cb[j]);
    repeat (20000) check(longint'($signed($urandom)), longint'($signed($urandom)));
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
