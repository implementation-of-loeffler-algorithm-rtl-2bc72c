// isqrt2_scale: multiplication by 1/sqrt(2), the round block of the
// modified Loeffler flow graph (two instances in the DCT, two in the IDCT).
//
// The input is multiplied by the 13-bit-fraction constant ISQRT2 = 5793
// (= round(2^13/sqrt(2))) on one DSP multiplier, then rounded to the nearest
// integer (ties toward +infinity) by adding 2^12 and shifting right by 13.
// Since |d/sqrt(2)| < |d|, the result keeps the input width. Combinational.
module isqrt2_scale
  import loeffler_pkg::*;
#(
  parameter int unsigned DW = 16
) (
  input  logic signed [DW-1:0] d,
  output logic signed [DW-1:0] q   // round(d / sqrt(2))
);

  localparam int unsigned PW = DW + COEF_W;

  logic signed [PW-1:0] prod;
  logic signed [PW-1:0] rounded;

  dsp_mult #(.A_W(DW), .B_W(COEF_W)) u_mult (.a(d), .b(ISQRT2), .p(prod));

  always_comb begin
    rounded = (prod + PW'(1 << (COEF_FRAC - 1))) >>> COEF_FRAC;
    q       = rounded[DW-1:0];
  end

endmodule
