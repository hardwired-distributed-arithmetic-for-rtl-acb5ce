// hda_dct_cu -- DCT/IDCT computational unit for one output (HDA)
//
// Computes one inner product of four data inputs with four fixed
// coefficients, y = round(sum_n A_n * x[n]), without a multiplier or ROM.
// Each coefficient A_n is recoded at elaboration by hda_pkg::vr2_encode into
// signed power-of-two digits, and every digit becomes one hardwired partial
// product +-(x[n] << shift).  The unit holds two coefficient sets, one for
// the DCT (row ROW of the even or odd Chen matrix) and one for the IDCT
// (column ROW of the same matrix, i.e. the transposed matrix); a multiplexer
// in front of each partial-product slot picks the set given by mode.
//
// Summation network (20 slots):
//   five 4:2 compressors on slots 0-3, 4-7, ..., 16-19
//   two 5:2 compressors: left  = outputs of 4:2 #0, #1 and the sum of #2,
//                        right = outputs of 4:2 #3, #4 and the carry of #2
//   F/F (4 vectors)
//   4:2 compressor, then a 5:2 compressor that also adds the correction
//   constant (one +1 for every inverted partial product of the mode)
//   F/F (2 vectors)
//   rounding: carry-propagate add, + 2^(FRAC-1), drop FRAC bits, keep OUT_W
// Partial products are sign-extended to ACC_W bits, wide enough that the
// sum is exact before rounding.
//
// Interface and timing: x and mode are sampled with in_valid; y, out_mode
// and out_valid appear two clock edges later.  One result per cycle.
//
// From the document: the summation network of compressors, pipeline
// registers, sign-extension input and rounding, the multiplexers in front
// of the first compressors, and the count of 20 slots.  This design's
// choices: what the multiplexers select (DCT or IDCT coefficient set), the
// coefficient precision FRAC = 12, the exact-width datapath and the
// register placement.
module hda_dct_cu
  import hda_pkg::*;
#(
  parameter int IN_W  = 17,
  parameter int OUT_W = 16,
  parameter int FRAC  = 12,
  parameter bit ODD   = 1'b0,
  parameter int ROW   = 0,
  parameter int NSLOT = 20
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  dct_mode_t               mode,
  input  logic signed [IN_W-1:0]  x [4],
  output logic                    out_valid,
  output dct_mode_t               out_mode,
  output logic signed [OUT_W-1:0] y
);
  localparam int ACC_W = IN_W + FRAC + 2;

  typedef struct packed {
    logic       v;    // slot used
    logic       neg;  // inverted partial product
    logic [1:0] src;  // which data input
    logic [5:0] sh;   // left shift
  } pp_slot_t;
  typedef pp_slot_t [NSLOT-1:0] slot_tab_t;

  function automatic int coef(input bit idct, input int n);
    return idct ? dct_coef(ODD, n, ROW, FRAC) : dct_coef(ODD, ROW, n, FRAC);
  endfunction

  // Total number of partial products of a mode.
  function automatic int pp_count(input bit idct);
    int t;
    t = 0;
    for (int n = 0; n < 4; n++) t += int'(vr2_encode(longint'(coef(idct, n)), FRAC + 1).count);
    return t;
  endfunction

  // Slot table of a mode.
  function automatic slot_tab_t build(input bit idct);
    slot_tab_t t;
    sd_code_t  c;
    int        s;
    t = '0;
    s = 0;
    for (int n = 0; n < 4; n++) begin
      c = vr2_encode(longint'(coef(idct, n)), FRAC + 1);
      for (int i = 0; i < MAXD; i++) begin
        if (i < int'(c.count) && s < NSLOT) begin
          t[s].v   = 1'b1;
          t[s].neg = c.neg[i];
          t[s].src = 2'(n);
          t[s].sh  = c.shift[i];
          s++;
        end
      end
    end
    return t;
  endfunction

  function automatic int neg_count(input slot_tab_t t);
    int k;
    k = 0;
    for (int s = 0; s < NSLOT; s++) if (t[s].v && t[s].neg) k++;
    return k;
  endfunction

  localparam slot_tab_t TAB_DCT  = build(1'b0);
  localparam slot_tab_t TAB_IDCT = build(1'b1);
  localparam int        NEG_DCT  = neg_count(TAB_DCT);
  localparam int        NEG_IDCT = neg_count(TAB_IDCT);

  if (NSLOT != 20) begin : g_bad_slots
    $error("hda_dct_cu: the summation network is built for 20 slots");
  end
  if (pp_count(1'b0) > NSLOT || pp_count(1'b1) > NSLOT) begin : g_too_many
    $error("hda_dct_cu: coefficients need more partial products than NSLOT");
  end

  logic [ACC_W-1:0] xe [4];
  logic [ACC_W-1:0] pp [NSLOT];
  logic [ACC_W-1:0] s42 [5];
  logic [ACC_W-1:0] c42 [5];
  logic [ACC_W-1:0] sl, cl, sr, cr;
  logic [ACC_W-1:0] sl_q, cl_q, sr_q, cr_q;
  logic [ACC_W-1:0] s3, c3, s4, c4, sign_ex;
  logic [ACC_W-1:0] s4_q, c4_q, rounded;
  dct_mode_t        mode_1, mode_2;
  logic             v_1, v_2;

  // Partial-product multiplexers.
  always_comb begin
    pp_slot_t e;
    for (int n = 0; n < 4; n++) xe[n] = ACC_W'(x[n]);
    for (int s = 0; s < NSLOT; s++) begin
      e = (mode == MODE_IDCT) ? TAB_IDCT[s] : TAB_DCT[s];
      if (!e.v)      pp[s] = '0;
      else if (e.neg) pp[s] = ~(xe[e.src] << e.sh);
      else            pp[s] = xe[e.src] << e.sh;
    end
  end

  for (genvar k = 0; k < 5; k++) begin : g_c42
    comp42 #(.W(ACC_W)) u_c42 (
      .a(pp[4*k]), .b(pp[4*k+1]), .c(pp[4*k+2]), .d(pp[4*k+3]),
      .sum(s42[k]), .carry(c42[k])
    );
  end

  comp52 #(.W(ACC_W)) u_c52_l (
    .a(s42[0]), .b(c42[0]), .c(s42[1]), .d(c42[1]), .e(s42[2]), .sum(sl), .carry(cl)
  );
  comp52 #(.W(ACC_W)) u_c52_r (
    .a(s42[3]), .b(c42[3]), .c(s42[4]), .d(c42[4]), .e(c42[2]), .sum(sr), .carry(cr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_1    <= 1'b0;
      mode_1 <= MODE_DCT;
      sl_q   <= '0;
      cl_q   <= '0;
      sr_q   <= '0;
      cr_q   <= '0;
    end else begin
      v_1 <= in_valid;
      if (in_valid) begin
        mode_1 <= mode;
        sl_q   <= sl;
        cl_q   <= cl;
        sr_q   <= sr;
        cr_q   <= cr;
      end
    end
  end

  comp42 #(.W(ACC_W)) u_c42_mid (
    .a(sl_q), .b(cl_q), .c(sr_q), .d(cr_q), .sum(s3), .carry(c3)
  );

  assign sign_ex = (mode_1 == MODE_IDCT) ? ACC_W'(NEG_IDCT) : ACC_W'(NEG_DCT);

  comp52 #(.W(ACC_W)) u_c52_se (
    .a(s3), .b(c3), .c(sign_ex), .d('0), .e('0), .sum(s4), .carry(c4)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_2    <= 1'b0;
      mode_2 <= MODE_DCT;
      s4_q   <= '0;
      c4_q   <= '0;
    end else begin
      v_2 <= v_1;
      if (v_1) begin
        mode_2 <= mode_1;
        s4_q   <= s4;
        c4_q   <= c4;
      end
    end
  end

  // Rounding.
  assign rounded   = s4_q + c4_q + (ACC_W'(1) << (FRAC - 1));
  assign y         = rounded[FRAC +: OUT_W];
  assign out_valid = v_2;
  assign out_mode  = mode_2;
endmodule
