// dsp_mult: signed multiplier, the unit the transform places in one embedded
// DSP-block multiplier of the FPGA.
//
// All multiplications of the Loeffler datapath (9 in the rotators, 2 in the
// 1/sqrt(2) scalers) are written through this module, so that a synthesis
// tool infers exactly one hard multiplier per instance and the adders stay
// in logic. The product is combinational and keeps full precision
// (A_W + B_W bits); rounding and the pipeline register are left to the
// caller, whose stage register a DSP block can absorb as its output
// register. Operand widths are this design's choice: with the defaults
// (18 x 16) one instance fits a single 18x18 DSP-block multiplier.
module dsp_mult #(
  parameter int unsigned A_W = 18,
  parameter int unsigned B_W = 16
) (
  input  logic signed [A_W-1:0]     a,  // data operand
  input  logic signed [B_W-1:0]     b,  // coefficient operand
  output logic signed [A_W+B_W-1:0] p   // a * b, exact
);

  always_comb p = (A_W+B_W)'(a) * (A_W+B_W)'(b);

endmodule
