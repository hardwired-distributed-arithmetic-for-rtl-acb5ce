// comp42 -- W-bit 4:2 compressor
//
// Reduces four operands to a sum and a carry vector with
// a + b + c + d == sum + carry (mod 2^W).  Each bit slice is the usual
// 4:2 cell: a full adder on a, b, c whose majority output (cout) goes
// sideways into the next slice, and a second full adder on the first sum,
// d and the cout of the slice below.  The sideways signal depends only on
// a, b, c, so the delay is two full adders whatever W is.  The carry
// vector is returned already shifted left by one place.  Combinational.
//
// The 4:2 compressor and its 16-bit width are the document's; the cell
// structure is the standard one.
module comp42 #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] s1;    // first full adder sum
  logic [W-1:0] cout;  // first full adder carry, to the next slice
  logic [W-1:0] cin;   // cout of the slice below
  logic [W-1:0] c2;    // second full adder carry

  always_comb begin
    s1    = a ^ b ^ c;
    cout  = (a & b) | (a & c) | (b & c);
    cin   = {cout[W-2:0], 1'b0};
    sum   = s1 ^ d ^ cin;
    c2    = (s1 & d) | (s1 & cin) | (d & cin);
    carry = {c2[W-2:0], 1'b0};
  end
endmodule
