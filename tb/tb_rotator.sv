// tb_rotator: self-checking test of the 3-multiplier rotator for every angle
// the transforms use (n = 1, 3, 6 and their negatives, gain sqrt(2)).
// The TB derives the 13-bit constants itself from $cos/$sin, and for random
// and extreme 16-bit input pairs checks each output bit-exactly against
//   round(((b-a)*I1 + a*(I0+I1)) / 2^13),  round((-(b+a)*I0 + a*(I0+I1)) / 2^13)
// and against the real rotation sqrt(2)*R(n*pi/16) within the rounding step
// plus the constants' quantisation error: 0.5 + (|I0|+|I1|)*2^-13.
module tb_rotator;
  localparam int DW = 16;
  localparam real PI = 3.14159265358979323846;
  localparam int NANG = 6;
  localparam int ANG [NANG] = '{1, 3, 6, -1, -3, -6};

  logic signed [DW-1:0] i0, i1;
  logic signed [DW:0] o0 [NANG], o1 [NANG];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NANG; g++) begin : g_rot
    rotator #(.DW(DW), .N(ANG[g])) dut (.i0, .i1, .o0(o0[g]), .o1(o1[g]));
  end

  function automatic real rabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic check_pair(input int v0, input int v1);
    i0 = DW'(v0);
    i1 = DW'(v1);
    #1;
    for (int g = 0; g < NANG; g++) begin
      real ka, kb, r0, r1, tol;
      longint ca, cbma, cnbpa, e0, e1;
      ka = $sqrt(2.0) * $cos(ANG[g] * PI / 16.0);
      kb = $sqrt(2.0) * $sin(ANG[g] * PI / 16.0);
      ca    = longint'($floor(ka * 8192.0 + 0.5));
      cbma  = longint'($floor((kb - ka) * 8192.0 + 0.5));
      cnbpa = longint'($floor(-(kb + ka) * 8192.0 + 0.5));
      e0 = (cbma * v1 + ca * (v0 + v1) + 4096) >>> 13;
      e1 = (cnbpa * v0 + ca * (v0 + v1) + 4096) >>> 13;
      r0 = ka * v0 + kb * v1;
      r1 = -kb * v0 + ka * v1;
      tol = 0.5 + ((v0 < 0 ? -v0 : v0) + (v1 < 0 ? -v1 : v1)) / 8192.0;
      checks += 2;
      if (longint'(o0[g]) != e0 || rabs(real'(o0[g]) - r0) > tol) begin
        failures++;
        if (failures < 10) $display("FAIL: n=%0d O0(%0d,%0d)=%0d expected %0d (%f)", ANG[g], v0, v1, o0[g], e0, r0);
      end
      if (longint'(o1[g]) != e1 || rabs(real'(o1[g]) - r1) > tol) begin
        failures++;
        if (failures < 10) $display("FAIL: n=%0d O1(%0d,%0d)=%0d expected %0d (%f)", ANG[g], v0, v1, o1[g], e1, r1);
      end
    end
  endtask

  initial begin
    int lo, hi;
    lo = -(1 << (DW-1));
    hi = (1 << (DW-1)) - 1;
    check_pair(lo, lo); check_pair(lo, hi); check_pair(hi, lo); check_pair(hi, hi);
    check_pair(0, 0);   check_pair(1, 0);   check_pair(0, 1);
    repeat (20000) check_pair(int'($signed(DW'($urandom))), int'($signed(DW'($urandom))));
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
