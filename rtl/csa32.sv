// csa32 -- W-bit 3:2 carry-save adder (a row of full adders)
//
// Reduces three operands to a sum vector and a carry vector with
// a + b + c == sum + carry (mod 2^W).  The carry vector is already shifted
// left by one place, so the two outputs can be added or compressed further
// without realignment.  Purely combinational.  Used inside the 5:2
// compressor; the full-adder row is the textbook carry-save stage.
module csa32 #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] maj;

  always_comb begin
    sum   = a ^ b ^ c;
    maj   = (a & b) | (a & c) | (b & c);
    carry = {maj[W-2:0], 1'b0};
  end
endmodule
