// tb_hda_top -- end-to-end test of the transform engine at its default sizes
//
// Image-compression use of both datapaths, run at the same time:
//   * 2-D DCT of an 8x8 block of 8-bit pixels (level-shifted by -128):
//     eight row vectors through the 1-D DCT, transpose (done here), eight
//     column vectors; then the 2-D IDCT the same way with the mode switched
//     to IDCT.  The 2-D coefficients must be within 3 of the real-valued
//     2-D DCT and the reconstructed block within 3 of the original pixels.
//     Every 1-D result must arrive after the second rising edge counting
//     the one that takes its vector.
//   * one level of the Daubechies N=6 DWT on 64 lines' worth of pixels
//     scaled by 2^4 (13-bit inputs), with idle cycles: every result is
//     compared with the real-valued filter (within 6) and the low/high
//     results must alternate, 1 per sample.
// Mechanisms counted (each must occur): DCT vectors, IDCT vectors, mode
// switches, back-to-back vectors, DWT low- and high-pass results, DWT idle
// input cycles.
module tb_hda_top;
  import hda_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               dct_in_valid = 1'b0;
  dct_mode_t          dct_mode = MODE_DCT;
  logic signed [15:0] dct_din  [8];
  logic               dct_out_valid;
  dct_mode_t          dct_out_mode;
  logic signed [15:0] dct_dout [8];
  logic               dwt_in_valid = 1'b0;
  logic signed [12:0] dwt_din = '0;
  logic               dwt_out_valid, dwt_out_high;
  logic signed [16:0] dwt_dout;

  hda_top dut (
    .clk(clk), .rst_n(rst_n),
    .dct_in_valid(dct_in_valid), .dct_mode(dct_mode), .dct_din(dct_din),
    .dct_out_valid(dct_out_valid), .dct_out_mode(dct_out_mode), .dct_dout(dct_dout),
    .dwt_in_valid(dwt_in_valid), .dwt_din(dwt_din),
    .dwt_out_valid(dwt_out_valid), .dwt_out_high(dwt_out_high), .dwt_dout(dwt_dout)
  );

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int n_dct = 0, n_idct = 0, n_switch = 0, n_b2b = 0;
  int n_low = 0, n_high = 0, n_gap = 0;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  function automatic real creal(input int k, input int n);
    if (k == 0) return 0.5 / $sqrt(2.0);
    return 0.5 * $cos(real'(k * (2 * n + 1)) * 3.14159265358979 / 16.0);
  endfunction

  // ---------------------------------------------------------------- DCT
  int pix [8][8];
  int rows_out [8][8];
  int coef [8][8];
  int cols_out [8][8];
  int recon [8][8];
  longint issue_t [$];
  int last_mode = -1;

  // Send eight vectors back to back and collect the eight results.
  task automatic pass(input dct_mode_t m, input int vin [8][8], output int vout [8][8]);
    int got;
    got = 0;
    if (last_mode >= 0 && last_mode != int'(m)) n_switch++;
    last_mode = int'(m);
    fork
      begin
        for (int v = 0; v < 8; v++) begin
          @(negedge clk);
          dct_in_valid = 1'b1;
          dct_mode     = m;
          for (int k = 0; k < 8; k++) dct_din[k] = 16'(vin[v][k]);
          @(posedge clk);
          #1;
          issue_t.push_back(cycle + 1);
          if (v > 0) n_b2b++;
          if (m == MODE_DCT) n_dct++; else n_idct++;
        end
        @(negedge clk);
        dct_in_valid = 1'b0;
      end
      begin
        while (got < 8) begin
          @(posedge clk);
          #1;
          if (dct_out_valid) begin
            check(issue_t.size() > 0 && cycle == issue_t.pop_front() && dct_out_mode == m,
                  "DCT result timing or mode");
            for (int k = 0; k < 8; k++) vout[got][k] = int'(dct_dout[k]);
            got++;
          end
        end
      end
    join
  endtask

  task automatic transpose(input int a [8][8], output int b [8][8]);
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) b[j][i] = a[i][j];
  endtask

  task automatic run_dct();
    int t [8][8];
    real r;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        pix[i][j] = ((i * 29 + j * 13 + (i * j) % 7 * 11) % 256) - 128;
    pix[0][0] = 127;
    pix[7][7] = -128;
    pass(MODE_DCT, pix, rows_out);        // row transforms
    transpose(rows_out, t);
    pass(MODE_DCT, t, cols_out);          // column transforms: cols_out[v][u] = F(u,v)
    transpose(cols_out, coef);            // coef[u][v]: u vertical, v horizontal frequency
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        r = 0.0;
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++) r += creal(u, i) * creal(v, j) * pix[i][j];
        check(real'(coef[u][v]) - r < 3.0 && r - real'(coef[u][v]) < 3.0,
              $sformatf("2-D DCT F(%0d,%0d)=%0d, real %f", u, v, coef[u][v], r));
      end
    // Inverse: columns first, then rows.
    transpose(coef, t);                   // t[v][u]: one column of coefficients per vector
    pass(MODE_IDCT, t, cols_out);         // cols_out[v][i]
    transpose(cols_out, t);               // t[i][v]
    pass(MODE_IDCT, t, recon);            // recon[i][j]
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        check(recon[i][j] - pix[i][j] <= 3 && pix[i][j] - recon[i][j] <= 3,
              $sformatf("reconstructed pixel (%0d,%0d)=%0d, original %0d", i, j, recon[i][j], pix[i][j]));
  endtask

  // ---------------------------------------------------------------- DWT
  localparam real HR [6] = '{0.3326705529500826, 0.8068915093110925, 0.4598775021184915,
                             -0.1350110200102546, -0.0854412738820267, 0.0352262918857095};
  localparam int NDWT = 512;
  int dwt_x [NDWT];
  real dwt_exp [$];
  int  dwt_kind [$];

  task automatic run_dwt();
    for (int s = 0; s < NDWT; s++) begin
      real yr;
      if ($urandom_range(0, 4) == 0) begin
        @(negedge clk);
        dwt_in_valid = 1'b0;
        n_gap++;
      end
      @(negedge clk);
      dwt_in_valid = 1'b1;
      dwt_x[s] = ((s * 37 + (s / 8) * 91) % 256) * 16;   // 8-bit pixels times 2^4
      dwt_din  = 13'(dwt_x[s]);
      yr = 0.0;
      for (int k = 0; k < 6; k++) begin
        int xv;
        xv = (s - k >= 0) ? dwt_x[s - k] : 0;
        if (s % 2 == 0) yr += HR[k] * xv;
        else            yr += ((k % 2 == 0) ? HR[5 - k] : -HR[5 - k]) * xv;
      end
      dwt_exp.push_back(yr);
      dwt_kind.push_back(s % 2);
    end
    @(negedge clk);
    dwt_in_valid = 1'b0;
  endtask

  always @(posedge clk) begin
    #1;
    if (rst_n && dwt_out_valid) begin
      real er;
      int  ek;
      if (dwt_exp.size() == 0) check(1'b0, "unexpected DWT result");
      else begin
        er = dwt_exp.pop_front();
        ek = dwt_kind.pop_front();
        check(int'(dwt_out_high) == ek && real'(int'(dwt_dout)) - er < 6.0 && er - real'(int'(dwt_dout)) < 6.0,
              $sformatf("DWT result %0d (high %0d), real %f", dwt_dout, dwt_out_high, er));
        if (dwt_out_high) n_high++; else n_low++;
      end
    end
  end

  initial begin
    for (int k = 0; k < 8; k++) dct_din[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    fork
      run_dct();
      run_dwt();
    join
    repeat (8) @(posedge clk);
    #2;
    check(n_dct > 0, "no DCT vector");
    check(n_idct > 0, "no IDCT vector");
    check(n_switch > 0, "no mode switch");
    check(n_b2b > 0, "no back-to-back vectors");
    check(n_low == NDWT / 2 && n_high == NDWT / 2, "DWT result count");
    check(n_gap > 0, "no DWT idle cycle");
    $display("DCT vectors %0d, IDCT vectors %0d, mode switches %0d, back-to-back %0d",
             n_dct, n_idct, n_switch, n_b2b);
    $display("DWT low %0d, high %0d, idle cycles %0d", n_low, n_high, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
