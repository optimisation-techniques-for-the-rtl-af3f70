// dct_butterfly: the "X +-" processing element of the AAT DCT structure.
//
// Combinational. Given two signed W-bit inputs it returns their sum and their
// difference (x0 + x1, x0 - x1) at W+1 bits, so nothing overflows. This is the
// element drawn in the source's processing-element figure; the widths are
// this design's choice.
module dct_butterfly #(
  parameter int W = 16
) (
  input  logic signed [W-1:0] x0,
  input  logic signed [W-1:0] x1,
  output logic signed [W:0]   sum,
  output logic signed [W:0]   diff
);
  always_comb begin
    sum  = (W+1)'(x0) + (W+1)'(x1);
    diff = (W+1)'(x0) - (W+1)'(x1);
  end
endmodule
