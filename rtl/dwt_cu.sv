// dwt_cu -- Daubechies N=6 (or N=4) DWT computational unit (two coefficients)
//
// Computes the low-pass and the high-pass output of a one-level N-tap
// Daubechies analysis filter bank (N = 6 by default, N = 4 selectable) on a
// stream of samples, with no multiplier.  N hardwired coefficient nets
// (A..F, hda_coef_net) each multiply by one fixed magnitude |h(j)|.  The
// high-pass filter g(k) = (-1)^k h(N-1-k) uses the same magnitudes in
// reverse order, so the
// same nets serve both filters: a tap/sign multiplexer in front of each net
// chooses, per output, which delayed sample the net sees and whether it is
// negated in advance.  The nets' 16-bit products are summed by a 5:2
// compressor (nets A..E) and a 4:2 compressor (its two outputs, net F and
// the sign-extension constant), then a carry-propagate adder.
//
//   window after sample s:  t_k = x(s-k), k = 0..N-1
//   s even:  y = sum_j  h(j) * t_j                      (low pass)
//   s odd :  y = sum_j  g(j) * t_j                      (high pass)
//   net j sees  sign_L(j) * t_j  (low)  or  sign_H(j) * t_(N-1-j)  (high),
//   sign_L(j) = sgn h(j),  sign_H(j) = (-1)^(N-1-j) * sgn h(j)
// With N = 4 the slots of nets E and F are zero.
// Each net rounds its own product to an integer (FRAC fraction bits
// dropped), so y is the sum of six rounded products, mod 2^OUT_W.
//
// Sign extension: every 16-bit product p is entered with its MSB inverted
// (p + 2^15, a non-negative number), and the constant -N * 2^15 added in
// the 4:2 compressor restores the signed sum, so no product is widened.
//
// Interface and timing: one sample per cycle with in_valid (gaps
// allowed).  Samples alternately produce a low-pass (out_high = 0) and a
// high-pass (out_high = 1) result, the first sample after reset a low-pass
// one, so the unit is busy every cycle a sample arrives: two samples in,
// one coefficient pair out.  The edge that takes a sample into the delay
// line is followed by the net input register edge and the output register
// edge, so out_valid and dout appear two edges after the taking edge.  The
// taps reset to zero.
//
// From the document: the 13-bit input, the six-stage delay line, the
// muxes with Mux_Cont[0:5] and inverters, nets A..F, the 5:2 and 4:2
// compressors with the sign-extension input, the CPA and the 17-bit output.
// This design's choices: alternating low/high outputs on successive
// samples (the high-pass window is one sample later than the low-pass one),
// the coefficient precision FRAC = 10, the register placement and the
// sign-extension method, and N = 4 as a parameter option (the document
// only counts its partial products).
module dwt_cu
  import hda_pkg::*;
#(
  parameter int IN_W  = 13,
  parameter int NET_W = 16,
  parameter int OUT_W = 17,
  parameter int FRAC  = 10,
  parameter int N     = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  din,
  output logic                    out_valid,
  output logic                    out_high,
  output logic signed [OUT_W-1:0] dout
);
  localparam int NTAP = N;

  if (N != 6 && N != 4) begin : g_bad_n
    $error("dwt_cu: N must be 6 or 4");
  end

  // Filter magnitudes and the signs each net input takes for either output.
  function automatic int coef_mag(input int j);
    int c;
    c = round_coef(dwt_h20(N, j), FRAC);
    return (c < 0) ? -c : c;
  endfunction
  function automatic bit neg_low(input int j);
    return dwt_h20(N, j) < 0;
  endfunction
  function automatic bit neg_high(input int j);
    return (dwt_h20(N, j) < 0) ^ (((N - 1 - j) % 2) == 1);
  endfunction

  // Sign-extension constant: -NTAP * 2^(NET_W-1) mod 2^OUT_W.
  localparam logic [OUT_W-1:0] SIGN_EX = OUT_W'(-(NTAP * (1 << (NET_W - 1))));

  logic signed [IN_W-1:0]  tap [NTAP];   // a(0) .. a(-5)
  logic                    phase;        // 1: next window is a high-pass one
  logic                    v_a, high_a;  // window valid / kind
  logic                    v_b, high_b;  // net inputs valid / kind
  logic [NTAP-1:0]         mux_cont;     // per net: 0 low-pass path, 1 high-pass path
  logic signed [NET_W-1:0] net_in  [NTAP];
  logic signed [NET_W-1:0] net_out [NTAP];
  logic        [OUT_W-1:0] opnd    [6];
  logic        [OUT_W-1:0] s5, c5, s4, c4, total;

  // Input delay line and the low/high alternation.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAP; k++) tap[k] <= '0;
      phase  <= 1'b0;
      v_a    <= 1'b0;
      high_a <= 1'b0;
    end else begin
      v_a <= in_valid;
      if (in_valid) begin
        tap[0] <= din;
        for (int k = 1; k < NTAP; k++) tap[k] <= tap[k-1];
        high_a <= phase;
        phase  <= ~phase;
      end
    end
  end

  // Input control: tap selection and negation in advance.
  always_comb begin
    mux_cont = {NTAP{high_a}};
    for (int j = 0; j < NTAP; j++) begin
      if (!mux_cont[j])
        net_in[j] = neg_low(j)  ? -NET_W'(tap[j])        : NET_W'(tap[j]);
      else
        net_in[j] = neg_high(j) ? -NET_W'(tap[NTAP-1-j]) : NET_W'(tap[NTAP-1-j]);
    end
  end

  // Nets A..F (each holds the 16-bit input register).
  for (genvar j = 0; j < NTAP; j++) begin : g_net
    hda_coef_net #(
      .IN_W(NET_W), .OUT_W(NET_W), .FRAC(FRAC), .COEF(coef_mag(j)), .NPP(5)
    ) u_net (
      .clk(clk), .rst_n(rst_n), .en(v_a), .x(net_in[j]), .y(net_out[j])
    );
    assign opnd[j] = OUT_W'({~net_out[j][NET_W-1], net_out[j][NET_W-2:0]});
  end
  for (genvar j = NTAP; j < 6; j++) begin : g_unused
    assign opnd[j] = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_b    <= 1'b0;
      high_b <= 1'b0;
    end else begin
      v_b <= v_a;
      if (v_a) high_b <= high_a;
    end
  end

  comp52 #(.W(OUT_W)) u_c52 (
    .a(opnd[0]), .b(opnd[1]), .c(opnd[2]), .d(opnd[3]), .e(opnd[4]),
    .sum(s5), .carry(c5)
  );
  comp42 #(.W(OUT_W)) u_c42 (
    .a(s5), .b(c5), .c(opnd[5]), .d(SIGN_EX), .sum(s4), .carry(c4)
  );
  assign total = s4 + c4;  // CPA

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_high  <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= v_b;
      if (v_b) begin
        out_high <= high_b;
        dout     <= total;
      end
    end
  end
endmodule
