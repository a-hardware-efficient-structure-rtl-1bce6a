// tb_cdiv_squarer -- exhaustive self-checking test of the squaring unit.
//
// Every one of the 65536 values of a 16-bit two's-complement operand is
// squared and compared with the square formed in 64-bit integer arithmetic.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_cdiv_squarer;

  localparam int unsigned W = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] x;
  logic [2*W-2:0]      sq;

  cdiv_squarer #(.W(W)) dut (.x(x), .sq(sq));

  int checks   = 0;
  int failures = 0;

  initial begin
    longint r;
    for (int v = -(1 << (W - 1)); v < (1 << (W - 1)); v++) begin
      x = W'(v);
      #1;
      r = longint'(v) * longint'(v);
      checks++;
      if (longint'(sq) != r) begin
        failures++;
        if (failures < 10) $display("FAIL %0d^2: got %0d want %0d", v, sq, r);
      end
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
