// tb_isqrt2_scale: self-checking test of the 1/sqrt(2) multiplier at a 16-bit
// width. The 13-bit constant is derived here from $sqrt, and every one of the
// 65536 inputs is checked bit-exactly against round(d*C/2^13) (ties toward
// +infinity) and against the real quotient d/sqrt(2) within the rounding step plus the
// constant's quantisation error: 0.5 + |d|*2^-14.
module tb_isqrt2_scale;
  localparam int DW = 16;
  logic signed [DW-1:0] d, q;
  int checks = 0, failures = 0;
  longint c, expv;
  real err, tol;

  isqrt2_scale #(.DW(DW)) dut (.*);

  initial begin
    c = longint'($rtoi(8192.0 / $sqrt(2.0) + 0.5));
    for (int v = -(1 << (DW-1)); v < (1 << (DW-1)); v++) begin
      d = DW'(v);
      #1;
      expv = (longint'(v) * c + 4096) >>> 13;
      err = real'(q) - real'(v) / $sqrt(2.0);
      tol = 0.5 + (v < 0 ? -v : v) / 16384.0;
      checks++;
      if (longint'(q) != expv || err > tol || err < -tol) begin
        failures++;
        if (failures < 10) $display("FAIL: %0d -> %0d, expected %0d", v, q, expv);
      end
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
