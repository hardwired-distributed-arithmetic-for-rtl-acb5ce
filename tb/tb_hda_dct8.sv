// tb_hda_dct8 -- self-checking test of the 8-point DCT/IDCT
//
// 3000 vectors, back to back or with idle cycles, random mode per vector.
// DCT vectors are random 12-bit samples; IDCT vectors are the real-valued
// DCT of random 12-bit samples, rounded.  Each output vector is checked
//   * exactly against an integer model computed here from the DCT
//     definition with 12-bit rounded coefficients C[k][m] (not from the
//     Chen factorisation): DCT X[k] = R(sum_m C[k][m] x[m]); IDCT
//     e[n] = R(sum_r C[2r][n] X[2r]), o[n] = R(sum_r C[2r+1][n] X[2r+1]),
//     x[n] = e[n] + o[n], x[7-n] = e[n] - o[n], R(p) = floor((p+2048)/4096);
//   * against the real-valued transform: DCT within 1.5, IDCT back to the
//     original samples within 2.5;
//   * for latency: valid after the second rising edge counting the one
//     that takes the vector, with its mode.
module tb_hda_dct8;
  import hda_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  dct_mode_t mode = MODE_DCT;
  logic signed [15:0] din  [8];
  logic signed [15:0] dout [8];
  logic      out_valid;
  dct_mode_t out_mode;
  always #5 clk = ~clk;

  hda_dct8 dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .mode(mode), .din(din),
    .out_valid(out_valid), .out_mode(out_mode), .dout(dout)
  );

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    int     y [8];
    real    r [8];
    real    tol;
    int     m;
    longint t;
  } exp_t;
  exp_t q [$];
  int n_dct = 0, n_idct = 0, n_switch = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real creal(input int k, input int n);
    if (k == 0) return 0.5 / $sqrt(2.0);
    return 0.5 * $cos(real'(k * (2 * n + 1)) * 3.14159265358979 / 16.0);
  endfunction
  function automatic int cq(input int k, input int n);
    real v, a;
    v = creal(k, n);
    a = (v < 0) ? -v : v;
    return (v < 0) ? -$rtoi(a * 4096.0 + 0.5) : $rtoi(a * 4096.0 + 0.5);
  endfunction
  function automatic int rq(input longint p);
    return int'((p + 2048) >>> 12);
  endfunction

  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        exp_t e;
        e = q.pop_front();
        for (int k = 0; k < 8; k++) begin
          real d;
          d = real'(int'(dout[k])) - e.r[k];
          checks++;
          if (int'(dout[k]) != e.y[k] || int'(out_mode) != e.m || cycle != e.t || d > e.tol || d < -e.tol) begin
            failures++;
            if (failures < 10) $display("FAIL mode %0d out %0d: %0d expected %0d (real %f) cycle %0d/%0d",
                                        e.m, k, dout[k], e.y[k], e.r[k], cycle, e.t);
          end
        end
      end
    end
  end

  initial begin
    int   xs [8];
    int   prev;
    exp_t e;
    prev = -1;
    for (int k = 0; k < 8; k++) din[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 6) == 0) begin
        in_valid = 1'b0;
        continue;
      end
      in_valid = 1'b1;
      mode = dct_mode_t'($urandom_range(0, 1));
      for (int k = 0; k < 8; k++) begin
        xs[k] = int'($signed(12'($urandom)));
        if (i < 10) xs[k] = (i % 2 == 0) ? 2047 : -2048;
        if (i >= 10 && i < 20) xs[k] = ((k + i) % 2 == 0) ? 2047 : -2048;
      end
      e.m = int'(mode);
      if (mode == MODE_DCT) begin
        for (int k = 0; k < 8; k++) din[k] = 16'(xs[k]);
        for (int k = 0; k < 8; k++) begin
          longint s;
          real    r;
          s = 0;
          r = 0.0;
          for (int m = 0; m < 8; m++) begin
            s += longint'(cq(k, m)) * xs[m];
            r += creal(k, m) * xs[m];
          end
          e.y[k] = int'($signed(16'(rq(s))));
          e.r[k] = r;
        end
        e.tol = 1.5;
        n_dct++;
      end else begin
        int cf [8];
        for (int k = 0; k < 8; k++) begin
          real r;
          r = 0.0;
          for (int m = 0; m < 8; m++) r += creal(k, m) * xs[m];
          cf[k] = $rtoi((r < 0) ? r - 0.5 : r + 0.5);
          din[k] = 16'(cf[k]);
        end
        for (int n = 0; n < 4; n++) begin
          longint se, so;
          int ev, od;
          se = 0;
          so = 0;
          for (int r = 0; r < 4; r++) begin
            se += longint'(cq(2 * r, n)) * cf[2 * r];
            so += longint'(cq(2 * r + 1, n)) * cf[2 * r + 1];
          end
          ev = rq(se);
          od = rq(so);
          e.y[n]     = int'($signed(16'(ev + od)));
          e.y[7 - n] = int'($signed(16'(ev - od)));
        end
        for (int k = 0; k < 8; k++) e.r[k] = real'(xs[k]);
        e.tol = 2.5;
        n_idct++;
      end
      if (prev >= 0 && prev != e.m) n_switch++;
      prev = e.m;
      @(posedge clk);
      #1;
      e.t = cycle + 1;
      q.push_back(e);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(posedge clk);
    #2;
    checks++;
    if (q.size() != 0 || n_dct == 0 || n_idct == 0 || n_switch == 0) begin
      failures++;
      $display("FAIL %0d results missing, dct %0d idct %0d switches %0d", q.size(), n_dct, n_idct, n_switch);
    end
    $display("DCT vectors %0d, IDCT vectors %0d, mode switches %0d", n_dct, n_idct, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
