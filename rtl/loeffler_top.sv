// loeffler_top: the 8-point DCT and the 8-point IDCT of the modified Loeffler
// algorithm, side by side, each with its own ports.
//
// The two transforms are independent pipelines on one clock and reset: the
// DCT takes 8 signed DCT_DW-bit samples and returns sqrt(8)-scaled DCT
// coefficients of DCT_DW+3 bits; the IDCT takes 8 signed IDCT_DW-bit
// coefficients and returns sqrt(8)-scaled samples of IDCT_DW+3 bits. Each
// accepts one vector per clock and answers 4 clocks later with its valid
// flag. Feeding the DCT output into the IDCT (IDCT_DW = DCT_DW+3, as with the defaults) gives back
// 8 times the original samples. Implementing both as separate units follows
// the algorithm's use for DCT and IDCT; the default widths (9-bit samples,
// 12-bit coefficients, as in common video codecs) are this design's choice.
module loeffler_top
  import loeffler_pkg::*;
#(
  parameter int unsigned DCT_DW  = 9,
  parameter int unsigned IDCT_DW = 12,
  parameter int unsigned GUARD   = 3
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // forward transform
  input  logic                       dct_in_valid,
  input  logic signed [DCT_DW-1:0]   dct_x [N_POINTS],
  output logic                       dct_out_valid,
  output logic signed [DCT_DW+2:0]   dct_X [N_POINTS],
  // inverse transform
  input  logic                       idct_in_valid,
  input  logic signed [IDCT_DW-1:0]  idct_X [N_POINTS],
  output logic                       idct_out_valid,
  output logic signed [IDCT_DW+2:0]  idct_y [N_POINTS]
);

  loeffler_dct8 #(.DW(DCT_DW), .GUARD(GUARD)) u_dct (
    .clk, .rst_n,
    .in_valid (dct_in_valid),
    .x        (dct_x),
    .out_valid(dct_out_valid),
    .X        (dct_X)
  );

  loeffler_idct8 #(.DW(IDCT_DW), .GUARD(GUARD)) u_idct (
    .clk, .rst_n,
    .in_valid (idct_in_valid),
    .X        (idct_X),
    .out_valid(idct_out_valid),
    .y        (idct_y)
  );

endmodule
