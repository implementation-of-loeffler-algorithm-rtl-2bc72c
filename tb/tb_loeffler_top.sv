// tb_loeffler_top: end-to-end test of the DCT and IDCT pipelines at their
// default sizes (9-bit samples, 12-bit coefficients).
//
// Sample vectors (random, all-minimum, all-maximum, and sign patterns that
// drive one coefficient to its largest magnitude) enter the DCT in bursts
// at full rate and with idle cycles between them. Every DCT result is checked
// against the sqrt(8)-scaled orthonormal DCT (1 LSB) and is then fed into
// the IDCT, whose result must match the IDCT of those coefficients (1.5 LSB)
// and give back 8 times the original samples (within 7, i.e. below one
// sample step after dividing by 8). Cycles in which no DCT result is ready
// carry random coefficient vectors into the IDCT. Both pipelines must answer
// exactly 4 cycles after each input. Finally rst_n is pulsed while vectors
// are in flight, and no result may come out afterwards.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_loeffler_top;
  localparam int DW = 9;        // DCT sample width (top default)
  localparam int CW = 12;       // IDCT coefficient width (top default)
  localparam int LAT = 4;
  localparam int NVEC = 2000;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic dct_in_valid = 0, dct_out_valid, idct_in_valid = 0, idct_out_valid;
  logic signed [DW-1:0]   dct_x [8];
  logic signed [DW+2:0]   dct_X [8];
  logic signed [CW-1:0]   idct_X [8];
  logic signed [CW+2:0]   idct_y [8];

  int checks = 0, failures = 0, cycle = 0;
  int sent = 0;
  int n_back_to_back = 0, n_bubble = 0, n_extreme = 0;
  int n_dct_checked = 0, n_roundtrip = 0, n_idct_random = 0, n_reset_flush = 0;
  real max_dct_err = 0.0, max_idct_err = 0.0;
  int max_rt_err = 0;
  bit flushing = 0, after_reset = 0, drain = 0;

  typedef struct { real v [8]; int t; int orig [8]; } dct_exp_t;
  typedef struct { real v [8]; int t; bit roundtrip; int orig [8]; } idct_exp_t;
  dct_exp_t  dq [$];
  idct_exp_t iq [$];

  loeffler_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic real rabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic real ck(input int k);
    return k == 0 ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  function automatic void fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cycle, msg);
  endfunction

  // ---------------- DCT driver ----------------
  initial begin
    bit last_valid;
    last_valid = 0;
    foreach (dct_x[i]) dct_x[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    while (sent < NVEC) begin
      // bursts of full-rate input alternate with stretches of idle cycles
      if (((sent / 50) % 2 == 1) || $urandom_range(2) != 0) begin
        int mode, pick;
        logic signed [DW-1:0] s [8];
        dct_exp_t e;
        mode = $urandom_range(9);
        pick = $urandom_range(7);
        for (int i = 0; i < 8; i++) begin
          case (mode)
            0: s[i] = -(1 <<< (DW-1));
            1: s[i] = (1 <<< (DW-1)) - 1;
            2: s[i] = ($cos((2*i+1)*pick*PI/16.0) >= 0.0) ? (1 <<< (DW-1)) - 1 : -(1 <<< (DW-1));
            default: s[i] = DW'($urandom);
          endcase
          dct_x[i] <= s[i];
          e.orig[i] = int'(s[i]);
        end
        if (mode <= 2) n_extreme++;
        for (int k = 0; k < 8; k++) begin
          real acc;
          acc = 0.0;
          for (int n = 0; n < 8; n++) acc += real'(s[n]) * $cos((2*n+1)*k*PI/16.0);
          e.v[k] = $sqrt(8.0) * ck(k) * 0.5 * acc;
        end
        e.t = cycle + 1;
        dq.push_back(e);
        dct_in_valid <= 1;
        if (last_valid) n_back_to_back++;
        last_valid = 1;
        sent++;
      end else begin
        dct_in_valid <= 0;
        if (last_valid) n_bubble++;
        last_valid = 0;
      end
      @(posedge clk);
    end
    dct_in_valid <= 0;
    drain = 1;
    repeat (2 * LAT + 4) @(posedge clk);
    checks++;
    if (dq.size() != 0 || iq.size() != 0) fail("results missing");

    // reset while vectors are in flight: nothing may come out afterwards
    flushing = 1;
    for (int i = 0; i < 3; i++) begin
      for (int j = 0; j < 8; j++) dct_x[j] <= DW'($urandom);
      dct_in_valid <= 1;
      @(posedge clk);
    end
    dct_in_valid <= 0;
    rst_n <= 0;
    @(posedge clk);
    after_reset = 1;
    rst_n <= 1;
    repeat (2 * LAT + 4) @(posedge clk);
    n_reset_flush++;

    // every mechanism must have happened
    checks += 7;
    if (n_dct_checked != NVEC) fail($sformatf("%0d DCT results of %0d", n_dct_checked, NVEC));
    if (n_roundtrip != NVEC)   fail($sformatf("%0d round trips of %0d", n_roundtrip, NVEC));
    if (n_back_to_back == 0)   fail("no back-to-back inputs");
    if (n_bubble == 0)         fail("no idle cycles between inputs");
    if (n_extreme == 0)        fail("no extreme vectors");
    if (n_idct_random == 0)    fail("no independent IDCT vectors");
    if (n_reset_flush == 0)    fail("no reset flush");
    $display("DCT results %0d (max err %f), round trips %0d (max |y-8x| %0d), IDCT-only %0d (max err %f)",
             n_dct_checked, max_dct_err, n_roundtrip, max_rt_err, n_idct_random, max_idct_err);
    $display("back-to-back %0d, idle gaps %0d, extreme vectors %0d, reset flushes %0d",
             n_back_to_back, n_bubble, n_extreme, n_reset_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- DCT monitor, IDCT driver ----------------
  always @(posedge clk) begin
    if (flushing) begin
      idct_in_valid <= rst_n && !after_reset;
      for (int k = 0; k < 8; k++) idct_X[k] <= CW'($urandom);
    end else if (dct_out_valid && rst_n) begin
      dct_exp_t e;
      idct_exp_t ie;
      if (dq.size() == 0) fail("unexpected DCT result");
      else begin
        e = dq.pop_front();
        checks++;
        if (cycle - e.t != LAT) fail($sformatf("DCT latency %0d", cycle - e.t));
        for (int k = 0; k < 8; k++) begin
          real err;
          err = rabs(real'(dct_X[k]) - e.v[k]);
          if (err > max_dct_err) max_dct_err = err;
          checks++;
          if (err > 1.0) fail($sformatf("DCT X[%0d]=%0d expected %f", k, dct_X[k], e.v[k]));
        end
        n_dct_checked++;
        // forward the coefficients into the IDCT
        for (int k = 0; k < 8; k++) idct_X[k] <= CW'(dct_X[k]);
        idct_in_valid <= 1;
        ie.roundtrip = 1;
        for (int n = 0; n < 8; n++) ie.orig[n] = e.orig[n];
        for (int n = 0; n < 8; n++) begin
          real acc;
          acc = 0.0;
          for (int k = 0; k < 8; k++) acc += ck(k) * 0.5 * real'(dct_X[k]) * $cos((2*n+1)*k*PI/16.0);
          ie.v[n] = $sqrt(8.0) * acc;
        end
        ie.t = cycle + 1;
        iq.push_back(ie);
      end
    end else if (rst_n && !drain && $urandom_range(1) == 0) begin
      idct_exp_t ie;
      logic signed [CW-1:0] c [8];
      for (int k = 0; k < 8; k++) begin
        c[k] = CW'($urandom);
        idct_X[k] <= c[k];
      end
      idct_in_valid <= 1;
      ie.roundtrip = 0;
      for (int n = 0; n < 8; n++) begin
        real acc;
        acc = 0.0;
        for (int k = 0; k < 8; k++) acc += ck(k) * 0.5 * real'(c[k]) * $cos((2*n+1)*k*PI/16.0);
        ie.v[n] = $sqrt(8.0) * acc;
        ie.orig[n] = 0;
      end
      ie.t = cycle + 1;
      iq.push_back(ie);
    end else begin
      idct_in_valid <= 0;
    end
  end

  // ---------------- IDCT monitor ----------------
  always @(posedge clk) begin
    if (idct_out_valid && rst_n && !flushing) begin
      idct_exp_t e;
      if (iq.size() == 0) fail("unexpected IDCT result");
      else begin
        e = iq.pop_front();
        checks++;
        if (cycle - e.t != LAT) fail($sformatf("IDCT latency %0d", cycle - e.t));
        for (int n = 0; n < 8; n++) begin
          real err;
          err = rabs(real'(idct_y[n]) - e.v[n]);
          if (err > max_idct_err) max_idct_err = err;
          checks++;
          if (err > 1.5) fail($sformatf("IDCT y[%0d]=%0d expected %f", n, idct_y[n], e.v[n]));
          if (e.roundtrip) begin
            int d;
            d = int'(idct_y[n]) - 8 * e.orig[n];
            if (d < 0) d = -d;
            if (d > max_rt_err) max_rt_err = d;
            checks++;
            if (d > 7) fail($sformatf("round trip y[%0d]=%0d, 8*x=%0d", n, idct_y[n], 8 * e.orig[n]));
          end
        end
        if (e.roundtrip) n_roundtrip++;
        else             n_idct_random++;
      end
    end
  end

  // after the reset pulse, both valid outputs must stay low
  always @(posedge clk)
    if (after_reset) begin
      checks++;
      if (dct_out_valid || idct_out_valid) fail("result after reset");
    end

  // ---------------- watchdog ----------------
  initial begin
    repeat (NVEC * 4 + 500) @(posedge clk);
    fail("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
