// hda_top -- transform engine for image compression built on hardwired
// distributed arithmetic
//
// Two independent datapaths share nothing but the clock and reset and
// stand side by side:
//   * hda_dct8: 8-point 1-D DCT / IDCT, one 8-sample vector per cycle,
//     mode selectable per vector, results two cycles later;
//   * dwt_cu: one level of a Daubechies N=6 analysis filter bank, one
//     sample per cycle, alternately a low-pass and a high-pass result three
//     cycles after the sample.
// Both replace every constant multiplication by shifts of the data chosen
// by variable radix-2 multi-bit coding of the constant, summed in fixed
// compressor trees.  Ports are those of the two units with dct_ / dwt_
// prefixes; see those modules for the timing.
//
// A 2-D DCT needs a transpose memory between a row and a column pass; it
// is not part of this RTL, so the 1-D unit's ports are brought out.
module hda_top
  import hda_pkg::*;
#(
  parameter int DCT_DIN_W = 16,
  parameter int DCT_OUT_W = 16,
  parameter int DCT_FRAC  = 12,
  parameter int DWT_IN_W  = 13,
  parameter int DWT_OUT_W = 17,
  parameter int DWT_FRAC  = 10
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // DCT / IDCT
  input  logic                        dct_in_valid,
  input  dct_mode_t                   dct_mode,
  input  logic signed [DCT_DIN_W-1:0] dct_din  [8],
  output logic                        dct_out_valid,
  output dct_mode_t                   dct_out_mode,
  output logic signed [DCT_OUT_W-1:0] dct_dout [8],
  // DWT
  input  logic                        dwt_in_valid,
  input  logic signed [DWT_IN_W-1:0]  dwt_din,
  output logic                        dwt_out_valid,
  output logic                        dwt_out_high,
  output logic signed [DWT_OUT_W-1:0] dwt_dout
);
  hda_dct8 #(.DIN_W(DCT_DIN_W), .OUT_W(DCT_OUT_W), .FRAC(DCT_FRAC)) u_dct (
    .clk(clk), .rst_n(rst_n), .in_valid(dct_in_valid), .mode(dct_mode), .din(dct_din),
    .out_valid(dct_out_valid), .out_mode(dct_out_mode), .dout(dct_dout)
  );

  dwt_cu #(.IN_W(DWT_IN_W), .NET_W(16), .OUT_W(DWT_OUT_W), .FRAC(DWT_FRAC)) u_dwt (
    .clk(clk), .rst_n(rst_n), .in_valid(dwt_in_valid), .din(dwt_din),
    .out_valid(dwt_out_valid), .out_high(dwt_out_high), .dout(dwt_dout)
  );
endmodule
