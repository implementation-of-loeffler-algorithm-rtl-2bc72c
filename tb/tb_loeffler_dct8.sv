// tb_loeffler_dct8: self-checking test of the pipelined 8-point Loeffler DCT.
//
// Drives random and extreme 9-bit sample vectors, with random idle cycles
// between them, and compares every output vector with the sqrt(8)-scaled
// orthonormal DCT computed here in floating point from the cosine sum
// (tolerance: 1 LSB). It also checks that each result appears exactly 4
// cycles after its input and that results come back in order.
module tb_loeffler_dct8;
  localparam int DW = 9;
  localparam int OW = DW + 3;
  localparam int LAT = 4;
  localparam int NVEC = 3000;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [DW-1:0] x [8];
  logic signed [OW-1:0] X [8];
  int checks = 0, failures = 0, cycle = 0;
  int sent = 0, got = 0;
  real maxerr = 0.0;

  typedef struct { real v [8]; int t; } exp_t;
  exp_t q [$];

  loeffler_dct8 #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic exp_t ref_dct(input logic signed [DW-1:0] s [8], input int t);
    exp_t e;
    for (int k = 0; k < 8; k++) begin
      real acc = 0.0;
      for (int n = 0; n < 8; n++) acc += real'(s[n]) * $cos((2*n+1)*k*PI/16.0);
      e.v[k] = $sqrt(8.0) * (k == 0 ? 1.0/$sqrt(2.0) : 1.0) * 0.5 * acc;
    end
    e.t = t;
    return e;
  endfunction

  // Driver
  initial begin
    foreach (x[i]) x[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    while (sent < NVEC) begin
      if ($urandom_range(3) == 0) begin
        in_valid <= 0;
      end else begin
        logic signed [DW-1:0] s [8];
        int mode, pick;
        mode = $urandom_range(9);
        pick = $urandom_range(7);
        for (int i = 0; i < 8; i++) begin
          case (mode)
            0: s[i] = -(1 <<< (DW-1));                          // all minimum
            1: s[i] = (1 <<< (DW-1)) - 1;                       // all maximum
            2: s[i] = (i % 2 == 1) ? -(1 <<< (DW-1)) : (1 <<< (DW-1)) - 1; // alternating
            3: s[i] = ($cos((2*i+1)*pick*PI/16.0) >= 0.0) ? (1 <<< (DW-1)) - 1 : -(1 <<< (DW-1)); // largest |X[pick]|
            default: s[i] = DW'($urandom);
          endcase
        end
        for (int i = 0; i < 8; i++) x[i] <= s[i];
        in_valid <= 1;
        q.push_back(ref_dct(s, cycle + 1));
        sent++;
      end
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (LAT + 3) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q.size());
    end
    checks++;
    if (got != NVEC) failures++;
    $display("max |error| = %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor
  always @(posedge clk) begin
    if (out_valid && rst_n) begin
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output at cycle %0d", cycle);
      end else begin
        exp_t e;
        e = q.pop_front();
        got++;
        checks++;
        if (cycle - e.t != LAT) begin
          failures++;
          $display("FAIL: latency %0d, expected %0d", cycle - e.t, LAT);
        end
        for (int k = 0; k < 8; k++) begin
          real err;
          err = real'(X[k]) - e.v[k];
          if (err < 0) err = -err;
          if (err > maxerr) maxerr = err;
          checks++;
          if (err > 1.0) begin
            failures++;
            if (failures < 10) $display("FAIL: X[%0d]=%0d expected %f", k, X[k], e.v[k]);
          end
        end
      end
    end
  end

  // Watchdog
  initial begin
    repeat (NVEC * 3 + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
