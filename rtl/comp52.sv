// comp52 -- W-bit 5:2 compressor
//
// Reduces five operands to a sum and a carry vector with
// a + b + c + d + e == sum + carry (mod 2^W).  Built as a 3:2 carry-save
// row on a, b, c followed by a 4:2 compressor on its two outputs and d, e,
// i.e. three full-adder delays.  The carry vector is returned already
// shifted left by one place.  Combinational.
//
// The 5:2 compressor and its place in the summation networks are the
// document's; building it from a 3:2 row and a 4:2 compressor is this
// design's choice.
module comp52 #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  input  logic [W-1:0] e,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] s3, c3;

  csa32 #(.W(W)) u_csa (.a(a), .b(b), .c(c), .sum(s3), .carry(c3));
  comp42 #(.W(W)) u_c42 (.a(s3), .b(c3), .c(d), .d(e), .sum(sum), .carry(carry));
endmodule
