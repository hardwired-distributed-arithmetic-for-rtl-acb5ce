// hda_coef_net -- hardwired constant multiplier (one "net" of the DWT unit)
//
// Multiplies a 16-bit two's complement input by a fixed positive
// coefficient COEF (an integer holding FRAC fractional bits) without a
// multiplier.  At elaboration COEF is recoded by hda_pkg::vr2_encode into
// signed power-of-two digits; each digit becomes one partial product, the
// registered input shifted left by the digit's position and inverted when
// the digit is negative.  The NPP partial-product slots go into a 5:2
// compressor, a carry-propagate adder adds the sum and carry vectors
// together with the +1 of every inverted partial product and the rounding
// half-LSB, and the result is shifted right by FRAC and truncated to OUT_W
// bits:  y = floor((x * COEF + 2^(FRAC-1)) / 2^FRAC)  mod 2^OUT_W.
//
// Interface and timing: x is captured in the input register on a clock
// edge with en high; y is a combinational function of that register, so
// y shows the product of x one cycle after it was presented.
//
// From the document: the 16-bit input register, five partial products per
// net, compressor, CPA, rounding and MSB truncation to a 16-bit product.
// This design's choices: partial products are sign-extended to the full
// product width rather than trimmed bit-slice by bit-slice, and the
// inversion corrections ride on the CPA together with the rounding constant.
module hda_coef_net
  import hda_pkg::*;
#(
  parameter int IN_W  = 16,
  parameter int OUT_W = 16,
  parameter int FRAC  = 10,
  parameter int COEF  = 341,
  parameter int NPP   = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);
  localparam int        CW    = $clog2(COEF + 1) + 1;      // coefficient width, signed
  localparam int        ACC_W = (IN_W + CW > FRAC + OUT_W) ? IN_W + CW : FRAC + OUT_W;
  localparam sd_code_t  CODE  = vr2_encode(longint'(COEF), CW);
  localparam int        NNEG  = sd_negs(CODE);

  if (COEF <= 0) begin : g_bad_coef
    $error("hda_coef_net: COEF must be positive, the sign is applied at the input");
  end
  if (int'(CODE.count) > NPP) begin : g_too_many
    $error("hda_coef_net: coefficient needs more partial products than NPP");
  end

  logic signed [IN_W-1:0]  x_q;      // the 16-bit input register
  logic        [ACC_W-1:0] xe;       // x_q sign-extended
  logic        [ACC_W-1:0] pp [5];   // partial-product slots
  logic        [ACC_W-1:0] ps, pc;   // compressor sum and carry
  logic        [ACC_W-1:0] full;     // rounded exact product

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  x_q <= '0;
    else if (en) x_q <= x;

  always_comb begin
    xe = ACC_W'(x_q);
    for (int i = 0; i < 5; i++) begin
      pp[i] = '0;
      if (i < NPP && i < int'(CODE.count))
        pp[i] = CODE.neg[i] ? ~(xe << CODE.shift[i]) : (xe << CODE.shift[i]);
    end
  end

  comp52 #(.W(ACC_W)) u_c52 (
    .a(pp[0]), .b(pp[1]), .c(pp[2]), .d(pp[3]), .e(pp[4]),
    .sum(ps), .carry(pc)
  );

  // CPA, rounding and MSB truncation.
  always_comb begin
    full = ps + pc + ACC_W'(NNEG) + (ACC_W'(1) << (FRAC - 1));
    y    = full[FRAC +: OUT_W];
  end
endmodule
