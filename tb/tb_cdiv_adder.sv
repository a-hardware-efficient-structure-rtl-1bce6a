// tb_cdiv_adder -- self-checking test of the signed adder/subtractor.
//
// Two instances, one adding and one subtracting, are driven with the corner
// values of a 17-bit two's-complement operand and with random operands. The
// expected results are formed in 64-bit integer arithmetic. A watchdog ends
// the run with a failure if it does not finish in time.
module tb_cdiv_adder;

  localparam int unsigned W = 17;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] x, y;
  logic signed [W:0]   s_add, s_sub;

  cdiv_adder #(.W(W), .SUB(1'b0)) dut_add (.x(x), .y(y), .s(s_add));
  cdiv_adder #(.W(W), .SUB(1'b1)) dut_sub (.x(x), .y(y), .s(s_sub));

  int checks   = 0;
  int failures = 0;

  task automatic check(input longint vx, input longint vy);
    longint ra, rs;
    x = W'(vx);
    y = W'(vy);
    #1;
    ra = longint'(x) + longint'(y);
    rs = longint'(x) - longint'(y);
    checks += 2;
    if (longint'(s_add) != ra) begin
      failures++;
      if (failures <= 20) $display("FAIL add %0d + %0d: got %0d want %0d", x, y, s_add, ra);
    end
    if (longint'(s_sub) != rs) begin
      failures++;
      if (failures <= 20) $display("FAIL sub %0d - %0d: got %0d want %0d", x, y, s_sub, rs);
    end
  endtask

  localparam longint MAXV = (longint'(1) << (W - 1)) - 1;
  localparam longint MINV = -(longint'(1) << (W - 1));

  initial begin
    static longint corners[6] = '{MINV, MINV + 1, -1, 0, 1, MAXV};
    foreach (corners[i]) foreach (corners[j]) check(corners[i], corners[j]);
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
