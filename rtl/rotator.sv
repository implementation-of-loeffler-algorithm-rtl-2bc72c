// rotator: the rectangular block of the modified Loeffler flow graph. It
// turns the pair [I0, I1] into
//   O0 =  k*cos(n*pi/16)*I0 + k*sin(n*pi/16)*I1
//   O1 = -k*sin(n*pi/16)*I0 + k*cos(n*pi/16)*I1
// with k = sqrt(2), using three multiplications and three additions:
//   O0 = (b-a)*I1 + a*(I0+I1),  O1 = -(b+a)*I0 + a*(I0+I1),
// a = k*cos, b = k*sin. The constants come from loeffler_pkg::rot_coef(N).
// A negative N gives the transposed (inverse) rotation used by the IDCT.
//
// Combinational: one pre-adder, three DSP multipliers, two post-adders, then
// rounding of the 13-bit coefficient fraction (add 2^12, shift right 13).
// The gain sqrt(2)*(|cos|+|sin|) is below 2 for every angle used, so the
// outputs are one bit wider than the inputs and cannot overflow.
module rotator
  import loeffler_pkg::*;
#(
  parameter int unsigned DW = 16,
  parameter int          N  = 6
) (
  input  logic signed [DW-1:0] i0,
  input  logic signed [DW-1:0] i1,
  output logic signed [DW:0]   o0,
  output logic signed [DW:0]   o1
);

  localparam rot_coef_t C  = rot_coef(N);
  localparam int unsigned PW = DW + 1 + COEF_W;

  logic signed [DW:0]        sum;
  logic signed [DW+COEF_W:0] p_sum;   // a * (I0 + I1)
  logic signed [DW+COEF_W-1:0] p_i1;  // (b - a) * I1
  logic signed [DW+COEF_W-1:0] p_i0;  // -(b + a) * I0
  logic signed [PW-1:0]      acc0, acc1;

  always_comb sum = (DW+1)'(i0) + (DW+1)'(i1);

  dsp_mult #(.A_W(DW+1), .B_W(COEF_W)) u_m_sum (.a(sum), .b(C.a),    .p(p_sum));
  dsp_mult #(.A_W(DW),   .B_W(COEF_W)) u_m_i1  (.a(i1),  .b(C.bma),  .p(p_i1));
  dsp_mult #(.A_W(DW),   .B_W(COEF_W)) u_m_i0  (.a(i0),  .b(C.nbpa), .p(p_i0));

  always_comb begin
    acc0 = (PW'(p_i1) + PW'(p_sum) + PW'(1 << (COEF_FRAC - 1))) >>> COEF_FRAC;
    acc1 = (PW'(p_i0) + PW'(p_sum) + PW'(1 << (COEF_FRAC - 1))) >>> COEF_FRAC;
    o0   = acc0[DW:0];
    o1   = acc1[DW:0];
  end

endmodule
