// loeffler_dct8: 8-point 1-D DCT by the modified Loeffler flow graph
// (11 multiplications, 29 additions), pipelined with one register per stage.
//
// Stage 1: four butterflies x[i] +- x[7-i] (sums on rows 0-3, differences on
//          rows 4-7).
// Stage 2: even part, butterflies on rows (0,3) and (1,2); odd part, rotators
//          sqrt(2)*C3 on rows (4,7) and sqrt(2)*C1 on rows (5,6).
// Stage 3: even part, butterfly (0,1) gives X0/X4 and rotator sqrt(2)*C6 on
//          rows (2,3) gives X2/X6; odd part, butterflies (4,6) and (7,5).
// Stage 4: rows 4 and 7 are multiplied by 1/sqrt(2) and combined by a last
//          butterfly into X1 and X7; rows 5 and 6 are X3 and X5 as they stand.
// The flow graph, its four stages, the rotator gains and angles and the two
// 1/sqrt(2) multipliers follow the algorithm; the pipelining, the widths and
// the rounding are this design's choices.
//
// Scaling: the graph computes sqrt(8) times the orthonormal DCT
//   X[k] = sqrt(8) * c(k)/2 * sum_n x[n]*cos((2n+1)k*pi/16),  c(0)=1/sqrt(2),
// so a row-column 2-D transform built from it carries a plain factor of 8.
//
// Arithmetic: the input is sign-extended to W = DW+GUARD+5 bits and given
// GUARD fractional bits; every multiplier rounds its 13-bit coefficient
// fraction; the output is rounded to an integer (ties toward +infinity) and
// is OUT_W = DW+3 bits wide: |X[0]| <= 8*2^(DW-1) is reached only by the
// most negative input, and every other |X[k]| stays below it, so 9-bit
// samples give 12-bit coefficients that fit the IDCT input directly.
//
// Interface/timing: x and in_valid are sampled on each rising clock edge, so
// a new 8-sample vector can be accepted every cycle. The result appears on X
// with out_valid exactly LATENCY = 4 cycles later. rst_n (asynchronous, active
// low) clears the valid pipeline; data registers are not reset.
module loeffler_dct8
  import loeffler_pkg::*;
#(
  parameter int unsigned DW    = 9,   // input sample width (signed)
  parameter int unsigned GUARD = 3    // fractional guard bits inside
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [DW-1:0]    x [N_POINTS],
  output logic                    out_valid,
  output logic signed [DW+2:0]    X [N_POINTS]
);

  localparam int unsigned W       = DW + GUARD + 5;
  localparam int unsigned OUT_W   = DW + 3;
  localparam int unsigned LATENCY = 4;

  typedef logic signed [W-1:0] word_t;

  word_t xin [8];
  word_t c1 [8], c2 [8], c3 [8];   // combinational result of stages 1..3
  word_t r1 [8], r2 [8], r3 [8];   // stage registers
  word_t m4, m7;                   // stage 4: rows 4 and 7 after 1/sqrt(2)
  word_t c4 [8];                   // stage 4 result, natural output order
  logic [LATENCY-1:0] vld;

  // W+1 bit results of butterflies and rotators, cut back to W bits: the
  // magnitudes never exceed 2^(W-2).
  logic signed [W:0] b1o0 [4], b1o1 [4];
  logic signed [W:0] b2o0 [2], b2o1 [2];
  logic signed [W:0] q3o0, q3o1, q1o0, q1o1;
  logic signed [W:0] b3o0 [3], b3o1 [3];
  logic signed [W:0] q6o0, q6o1;
  logic signed [W:0] b4o0, b4o1;

  always_comb
    for (int i = 0; i < 8; i++) xin[i] = word_t'(x[i]) <<< GUARD;

  // ---------------- stage 1 ----------------
  for (genvar i = 0; i < 4; i++) begin : g_s1
    butterfly #(.DW(W)) u_bf (.i0(xin[i]), .i1(xin[7-i]), .o0(b1o0[i]), .o1(b1o1[i]));
    assign c1[i]   = word_t'(b1o0[i]);   // x[i] + x[7-i]
    assign c1[7-i] = word_t'(b1o1[i]);   // x[i] - x[7-i]
  end

  // ---------------- stage 2 ----------------
  butterfly #(.DW(W)) u_s2_bf03 (.i0(r1[0]), .i1(r1[3]), .o0(b2o0[0]), .o1(b2o1[0]));
  butterfly #(.DW(W)) u_s2_bf12 (.i0(r1[1]), .i1(r1[2]), .o0(b2o0[1]), .o1(b2o1[1]));
  rotator #(.DW(W), .N(3)) u_s2_rot_c3 (.i0(r1[4]), .i1(r1[7]), .o0(q3o0), .o1(q3o1));
  rotator #(.DW(W), .N(1)) u_s2_rot_c1 (.i0(r1[5]), .i1(r1[6]), .o0(q1o0), .o1(q1o1));

  always_comb begin
    c2[0] = word_t'(b2o0[0]);
    c2[3] = word_t'(b2o1[0]);
    c2[1] = word_t'(b2o0[1]);
    c2[2] = word_t'(b2o1[1]);
    c2[4] = word_t'(q3o0);
    c2[7] = word_t'(q3o1);
    c2[5] = word_t'(q1o0);
    c2[6] = word_t'(q1o1);
  end

  // ---------------- stage 3 ----------------
  butterfly #(.DW(W)) u_s3_bf01 (.i0(r2[0]), .i1(r2[1]), .o0(b3o0[0]), .o1(b3o1[0]));
  rotator #(.DW(W), .N(6)) u_s3_rot_c6 (.i0(r2[2]), .i1(r2[3]), .o0(q6o0), .o1(q6o1));
  butterfly #(.DW(W)) u_s3_bf46 (.i0(r2[4]), .i1(r2[6]), .o0(b3o0[1]), .o1(b3o1[1]));
  butterfly #(.DW(W)) u_s3_bf75 (.i0(r2[7]), .i1(r2[5]), .o0(b3o0[2]), .o1(b3o1[2]));

  always_comb begin
    c3[0] = word_t'(b3o0[0]);  // X0
    c3[1] = word_t'(b3o1[0]);  // X4
    c3[2] = word_t'(q6o0);     // X2
    c3[3] = word_t'(q6o1);     // X6
    c3[4] = word_t'(b3o0[1]);
    c3[6] = word_t'(b3o1[1]);  // X5
    c3[7] = word_t'(b3o0[2]);
    c3[5] = word_t'(b3o1[2]);  // X3
  end

  // ---------------- stage 4 ----------------
  isqrt2_scale #(.DW(W)) u_s4_isq4 (.d(r3[4]), .q(m4));
  isqrt2_scale #(.DW(W)) u_s4_isq7 (.d(r3[7]), .q(m7));
  butterfly #(.DW(W)) u_s4_bf (.i0(m7), .i1(m4), .o0(b4o0), .o1(b4o1));

  always_comb begin
    c4[0] = r3[0];
    c4[4] = r3[1];
    c4[2] = r3[2];
    c4[6] = r3[3];
    c4[3] = r3[5];
    c4[5] = r3[6];
    c4[1] = word_t'(b4o0);
    c4[7] = word_t'(b4o1);
  end

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk) begin
    r1 <= c1;
    r2 <= c2;
    r3 <= c3;
    for (int k = 0; k < 8; k++)
      X[k] <= OUT_W'((c4[k] + word_t'(1 << (GUARD - 1))) >>> GUARD);
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
      hi = (c4[k] + word_t'(1 << (GUARD - 1))) >>> (GUARD + OUT_W - 1);
      if (hi != '0 && hi != '1) out_fits = 1'b0;
    end
  end

  a_out_fits: assert property (@(posedge clk) disable iff (!rst_n) vld[LATENCY-2] |-> out_fits)
    else $error("loeffler_dct8: output overflows %0d bits", OUT_W);

endmodule
