// loeffler_idct8: 8-point 1-D IDCT, computed by running the modified Loeffler
// DCT flow graph backwards (its transpose), pipelined one register per stage.
//
// The DCT graph is orthogonal up to a factor, so its transpose inverts it:
// butterflies stay butterflies, the 1/sqrt(2) multipliers stay where they
// are, and every rotator sqrt(2)*Cn becomes the rotator with angle -n. The
// stages are the DCT's in reverse order:
// Stage A (DCT stage 4): X1 +- X7, each multiplied by 1/sqrt(2) (rows 7, 4);
//          X3 and X5 go to rows 5 and 6.
// Stage B (DCT stage 3): even part, butterfly X0 +- X4 and rotator
//          sqrt(2)*C(-6) on (X2, X6); odd part, butterflies (4,6) and (7,5).
// Stage C (DCT stage 2): even part, butterflies (0,3) and (1,2); odd part,
//          rotators sqrt(2)*C(-3) on rows (4,7) and sqrt(2)*C(-1) on (5,6).
// Stage D (DCT stage 1): four butterflies give y[i] and y[7-i].
// Like the DCT it needs 11 multiplications and 29 additions. The transposed
// graph itself is this design's derivation; only its use for the IDCT and its
// operation count come from the algorithm.
//
// Scaling: the output is sqrt(8) times the orthonormal IDCT
//   y[n] = sqrt(8) * sum_k c(k)/2 * X[k]*cos((2n+1)k*pi/16),
// so loeffler_idct8(loeffler_dct8(x)) = 8*x up to rounding.
//
// Arithmetic: inputs get GUARD fractional bits inside W = DW+GUARD+5 bits;
// the multiplier inputs are narrowed to the range their values can reach
// (see WA/WB/WC below), so with the defaults every multiplier is at most
// 18 x 16 bits, like the DCT's;
// the output is rounded to an integer and is OUT_W = DW+3 bits wide: each
// output is bounded by sqrt(8)*(1/sqrt(8) + 1/2*sum_k|cos|)*2^(DW-1), about
// 7.47*2^(DW-1), which is below 2^(DW+2).
//
// Interface/timing: one coefficient vector per cycle in, result on y with
// out_valid exactly LATENCY = 4 cycles later. rst_n (asynchronous, active low)
// clears the valid pipeline; data registers are not reset.
module loeffler_idct8
  import loeffler_pkg::*;
#(
  parameter int unsigned DW    = 12,  // input coefficient width (signed)
  parameter int unsigned GUARD = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [DW-1:0]    X [N_POINTS],
  output logic                    out_valid,
  output logic signed [DW+2:0]    y [N_POINTS]
);

  localparam int unsigned W       = DW + GUARD + 5;
  localparam int unsigned OUT_W   = DW + 3;
  localparam int unsigned LATENCY = 4;

  // Multiplier inputs are cut to the width their values can reach, so that
  // every multiplier fits an 18x18 DSP multiplier (16-bit coefficients).
  // With G = 2^GUARD and |X| <= 2^(DW-1) on the guard grid:
  //   stage A  X1 +- X7                    |v| <= 2^DW * G            -> WA bits
  //   stage B  X2, X6                      |v| <= 2^(DW-1) * G        -> WB bits
  //   stage C  a4 +- a6, a7 +- a5          |v| <= (sqrt(2)+1) * 2^(DW-1) * G
  //                                              < 2^(DW+1) * G       -> WC bits
  localparam int unsigned WA = DW + GUARD + 1;
  localparam int unsigned WB = DW + GUARD;
  localparam int unsigned WC = DW + GUARD + 2;

  typedef logic signed [W-1:0] word_t;

  word_t xin [8];
  word_t ca [8], cb [8], cc [8], cd [8];
  word_t ra [8], rb [8], rc [8];
  logic signed [WA-1:0] t7, t4;
  logic [LATENCY-1:0] vld;

  logic signed [W:0] bao0, bao1;
  logic signed [W:0] bbo0 [3], bbo1 [3];
  logic signed [WB:0] q6o0, q6o1;
  logic signed [W:0] bco0 [2], bco1 [2];
  logic signed [WC:0] q3o0, q3o1, q1o0, q1o1;
  logic signed [W:0] bdo0 [4], bdo1 [4];

  always_comb
    for (int i = 0; i < 8; i++) xin[i] = word_t'(X[i]) <<< GUARD;

  // ---------------- stage A (transpose of DCT stage 4) ----------------
  butterfly #(.DW(W)) u_sa_bf (.i0(xin[1]), .i1(xin[7]), .o0(bao0), .o1(bao1));
  isqrt2_scale #(.DW(WA)) u_sa_isq7 (.d(WA'(bao0)), .q(t7));
  isqrt2_scale #(.DW(WA)) u_sa_isq4 (.d(WA'(bao1)), .q(t4));

  always_comb begin
    ca[0] = xin[0];
    ca[1] = xin[4];
    ca[2] = xin[2];
    ca[3] = xin[6];
    ca[4] = word_t'(t4);
    ca[5] = xin[3];
    ca[6] = xin[5];
    ca[7] = word_t'(t7);
  end

  // ---------------- stage B (transpose of DCT stage 3) ----------------
  butterfly #(.DW(W)) u_sb_bf01 (.i0(ra[0]), .i1(ra[1]), .o0(bbo0[0]), .o1(bbo1[0]));
  rotator #(.DW(WB), .N(-6)) u_sb_rot_c6 (.i0(WB'(ra[2])), .i1(WB'(ra[3])), .o0(q6o0), .o1(q6o1));
  butterfly #(.DW(W)) u_sb_bf46 (.i0(ra[4]), .i1(ra[6]), .o0(bbo0[1]), .o1(bbo1[1]));
  butterfly #(.DW(W)) u_sb_bf75 (.i0(ra[7]), .i1(ra[5]), .o0(bbo0[2]), .o1(bbo1[2]));

  always_comb begin
    cb[0] = word_t'(bbo0[0]);
    cb[1] = word_t'(bbo1[0]);
    cb[2] = word_t'(q6o0);
    cb[3] = word_t'(q6o1);
    cb[4] = word_t'(bbo0[1]);
    cb[6] = word_t'(bbo1[1]);
    cb[7] = word_t'(bbo0[2]);
    cb[5] = word_t'(bbo1[2]);
  end

  // ---------------- stage C (transpose of DCT stage 2) ----------------
  butterfly #(.DW(W)) u_sc_bf03 (.i0(rb[0]), .i1(rb[3]), .o0(bco0[0]), .o1(bco1[0]));
  butterfly #(.DW(W)) u_sc_bf12 (.i0(rb[1]), .i1(rb[2]), .o0(bco0[1]), .o1(bco1[1]));
  rotator #(.DW(WC), .N(-3)) u_sc_rot_c3 (.i0(WC'(rb[4])), .i1(WC'(rb[7])), .o0(q3o0), .o1(q3o1));
  rotator #(.DW(WC), .N(-1)) u_sc_rot_c1 (.i0(WC'(rb[5])), .i1(WC'(rb[6])), .o0(q1o0), .o1(q1o1));

  always_comb begin
    cc[0] = word_t'(bco0[0]);
    cc[3] = word_t'(bco1[0]);
    cc[1] = word_t'(bco0[1]);
    cc[2] = word_t'(bco1[1]);
    cc[4] = word_t'(q3o0);
    cc[7] = word_t'(q3o1);
    cc[5] = word_t'(q1o0);
    cc[6] = word_t'(q1o1);
  end

  // ---------------- stage D (transpose of DCT stage 1) ----------------
  for (genvar i = 0; i < 4; i++) begin : g_sd
    butterfly #(.DW(W)) u_bf (.i0(rc[i]), .i1(rc[7-i]), .o0(bdo0[i]), .o1(bdo1[i]));
    assign cd[i]   = word_t'(bdo0[i]);
    assign cd[7-i] = word_t'(bdo1[i]);
  end

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk) begin
    ra <= ca;
    rb <= cb;
    rc <= cc;
    for (int k = 0; k < 8; k++)
      y[k] <= OUT_W'((cd[k] + word_t'(1 << (GUARD - 1))) >>> GUARD);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};

  assign out_valid = vld[LATENCY-1];

  // Every result entering the output register must fit OUT_W bits: the bits
  // above the kept ones are all copies of the sign.
  logic out_fits;
  always_comb begin
    out_fits = 1'b1;
    for (int k = 0; k < 8; k++) begin
      word_t hi;
      hi = (cd[k] + word_t'(1 << (GUARD - 1))) >>> (GUARD + OUT_W - 1);
      if (hi != '0 && hi != '1) out_fits = 1'b0;
    end
  end

  a_out_fits: assert property (@(posedge clk) disable iff (!rst_n) vld[LATENCY-2] |-> out_fits)
    else $error("loeffler_idct8: output overflows %0d bits", OUT_W);

endmodule
