// hda_dct8 -- 8-point 1-D DCT / IDCT with hardwired distributed arithmetic
//
// Chen's factorisation splits the 8x8 DCT matrix into a 4x4 even matrix,
// applied to the sums x[n] + x[7-n], and a 4x4 odd matrix, applied to the
// differences x[n] - x[7-n].  Eight computational units (hda_dct_cu), four
// per matrix, each produce one output per cycle from hardwired shift-and-add
// networks, so all eight outputs of a vector come out together.
//
//   DCT  (mode = MODE_DCT):  X[2r]   = sum_n E[r][n] (x[n] + x[7-n])
//                            X[2r+1] = sum_n O[r][n] (x[n] - x[7-n])
//   IDCT (mode = MODE_IDCT): e[n] = sum_r E[r][n] X[2r]
//                            o[n] = sum_r O[r][n] X[2r+1]
//                            x[n] = e[n] + o[n],  x[7-n] = e[n] - o[n]
// with E, O the even and odd Chen matrices of +-0.5*cos(k*pi/16) (the
// orthonormal DCT), held with FRAC fraction bits.  Each unit rounds its
// own result, so an IDCT output can differ by one from rounding the exact
// sum once.  Results wrap modulo 2^OUT_W.
//
// Interface and timing: din holds one vector, samples (DCT) or
// coefficients in natural order (IDCT); it is taken with in_valid together
// with mode, which may change from one vector to the next.  dout, out_mode
// and out_valid follow two clock edges later; one vector per cycle.
//
// From the document: the input control block (sums and differences) and
// computational units for the even and odd matrices, and that the IDCT
// is built the same way.  This design's choices: one unit per output,
// each unit holding both the DCT and the IDCT coefficient set, and the
// output butterfly of the IDCT.
module hda_dct8
  import hda_pkg::*;
#(
  parameter int DIN_W = 16,
  parameter int OUT_W = 16,
  parameter int FRAC  = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  dct_mode_t               mode,
  input  logic signed [DIN_W-1:0] din  [8],
  output logic                    out_valid,
  output dct_mode_t               out_mode,
  output logic signed [OUT_W-1:0] dout [8]
);
  logic signed [DIN_W:0]   even [4];
  logic signed [DIN_W:0]   odd  [4];
  logic signed [OUT_W-1:0] ye   [4];
  logic signed [OUT_W-1:0] yo   [4];
  logic      [3:0]         ve, vo;
  dct_mode_t               me   [4];
  dct_mode_t               mo   [4];

  dct_input_ctrl #(.W(DIN_W)) u_in (.mode(mode), .x(din), .even(even), .odd(odd));

  for (genvar r = 0; r < 4; r++) begin : g_cu
    hda_dct_cu #(
      .IN_W(DIN_W + 1), .OUT_W(OUT_W), .FRAC(FRAC), .ODD(1'b0), .ROW(r)
    ) u_even (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .mode(mode), .x(even),
      .out_valid(ve[r]), .out_mode(me[r]), .y(ye[r])
    );
    hda_dct_cu #(
      .IN_W(DIN_W + 1), .OUT_W(OUT_W), .FRAC(FRAC), .ODD(1'b1), .ROW(r)
    ) u_odd (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .mode(mode), .x(odd),
      .out_valid(vo[r]), .out_mode(mo[r]), .y(yo[r])
    );
  end

  // All units run in lock step; unit 0 speaks for the others.
  assign out_valid = ve[0];
  assign out_mode  = me[0];

  // Output ordering (DCT) or output butterfly (IDCT).
  logic signed [OUT_W-1:0] dct_o  [8];
  logic signed [OUT_W-1:0] idct_o [8];
  for (genvar n = 0; n < 4; n++) begin : g_order
    assign dct_o[2*n]   = ye[n];
    assign dct_o[2*n+1] = yo[n];
    assign idct_o[n]    = ye[n] + yo[n];
    assign idct_o[7-n]  = ye[n] - yo[n];
  end
  for (genvar k = 0; k < 8; k++) begin : g_out
    assign dout[k] = (out_mode == MODE_DCT) ? dct_o[k] : idct_o[k];
  end

  // The eight units must stay in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (ve == {4{ve[0]}}) && (vo == {4{ve[0]}}) &&
    (me[1] == me[0]) && (me[2] == me[0]) && (me[3] == me[0]) &&
    (mo[0] == me[0]) && (mo[1] == me[0]) && (mo[2] == me[0]) && (mo[3] == me[0]));
endmodule
