// tb_dsp_mult: self-checking test of the signed DSP multiplier at its default
// 18 x 16 size. Checks the corner products (most negative and most positive
// operands) and 20000 random operand pairs against a 64-bit product.
module tb_dsp_mult;
  localparam int A_W = 18, B_W = 16;
  logic signed [A_W-1:0] a;
  logic signed [B_W-1:0] b;
  logic signed [A_W+B_W-1:0] p;
  int checks = 0, failures = 0;

  dsp_mult dut (.*);

  task automatic check(input longint av, input longint bv);
    longint expv;
    a = A_W'(av);
    b = B_W'(bv);
    #1;
    expv = longint'(a) * longint'(b);
    checks++;
    if (longint'(p) != expv) begin
      failures++;
      if (failures < 10) $display("FAIL: %0d * %0d = %0d, expected %0d", a, b, p, expv);
    end
  endtask

  initial begin
    check(-(1 <<< (A_W-1)), -(1 <<< (B_W-1)));
    check(-(1 <<< (A_W-1)), (1 <<< (B_W-1)) - 1);
    check((1 <<< (A_W-1)) - 1, -(1 <<< (B_W-1)));
    check((1 <<< (A_W-1)) - 1, (1 <<< (B_W-1)) - 1);
    check(0, -1);
    check(-1, -1);
    repeat (20000) check(longint'($urandom), longint'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
