// dct_input_ctrl -- input control block of the 8-point DCT/IDCT
//
// DCT mode: forms the butterfly of Chen's algorithm,
//     even[n] = x[n] + x[7-n],   odd[n] = x[n] - x[7-n],   n = 0..3,
// which feed the even (X0, X2, X4, X6) and odd (X1, X3, X5, X7) matrix
// units.  IDCT mode: the inputs are transform coefficients, so the block
// only sorts them, even[r] = X[2r] and odd[r] = X[2r+1].  The outputs are one
// bit wider than the inputs so the butterfly cannot overflow.
// Combinational; mode selects per cycle.
//
// The DCT butterfly is the document's; the IDCT sorting is this design's
// way of sharing the computational units between the two modes.
module dct_input_ctrl
  import hda_pkg::*;
#(
  parameter int W = 16
) (
  input  dct_mode_t            mode,
  input  logic signed [W-1:0]  x    [8],
  output logic signed [W:0]    even [4],
  output logic signed [W:0]    odd  [4]
);
  always_comb begin
    for (int n = 0; n < 4; n++) begin
      if (mode == MODE_DCT) begin
        even[n] = (W+1)'(x[n]) + (W+1)'(x[7-n]);
        odd[n]  = (W+1)'(x[n]) - (W+1)'(x[7-n]);
      end else begin
        even[n] = (W+1)'(x[2*n]);
        odd[n]  = (W+1)'(x[2*n+1]);
      end
    end
  end
endmodule
