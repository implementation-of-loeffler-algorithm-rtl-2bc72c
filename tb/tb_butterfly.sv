// tb_butterfly: self-checking test of the butterfly (sum and difference of
// a pair) at an 8-bit width: every one of the 65536 input pairs is checked
// against integer arithmetic.
module tb_butterfly;
  localparam int DW = 8;
  logic signed [DW-1:0] i0, i1;
  logic signed [DW:0] o0, o1;
  int checks = 0, failures = 0;

  butterfly #(.DW(DW)) dut (.*);

  initial begin
    for (int a = -(1 << (DW-1)); a < (1 << (DW-1)); a++)
      for (int b = -(1 << (DW-1)); b < (1 << (DW-1)); b++) begin
        i0 = DW'(a);
        i1 = DW'(b);
        #1;
        checks += 2;
        if (int'(o0) != a + b) failures++;
        if (int'(o1) != a - b) failures++;
        if (failures > 0 && failures < 5 && (int'(o0) != a + b || int'(o1) != a - b))
          $display("FAIL: %0d, %0d -> %0d, %0d", a, b, o0, o1);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
