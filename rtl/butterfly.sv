// butterfly: the add/subtract pair of the Loeffler flow graph,
// O0 = I0 + I1 and O1 = I0 - I1.
//
// Combinational. The outputs are one bit wider than the inputs so that no
// sum or difference can overflow. Used in every stage of the DCT and the
// IDCT (the butterfly is its own transpose).
module butterfly #(
  parameter int unsigned DW = 16
) (
  input  logic signed [DW-1:0] i0,
  input  logic signed [DW-1:0] i1,
  output logic signed [DW:0]   o0,  // i0 + i1
  output logic signed [DW:0]   o1   // i0 - i1
);

  always_comb begin
    o0 = (DW+1)'(i0) + (DW+1)'(i1);
    o1 = (DW+1)'(i0) - (DW+1)'(i1);
  end

endmodule
