// tb_hda_dct_cu -- self-checking test of the DCT/IDCT computational unit
//
// Two units, the even-matrix unit for X2 (ROW 1) and the odd-matrix unit
// for X5 (ROW 2), get 4000 random 17-bit input vectors with a random mode
// per vector and random idle cycles.  The coefficients are computed here
// from the DCT definition with $cos, 0.5*cos(k(2n+1)pi/16) (k = 0 scaled by
// 1/sqrt(2)), rounded to 12 fraction bits; DCT mode uses matrix row ROW,
// IDCT mode column ROW.  Expected: y = floor((sum A_n x_n + 2048) / 4096)
// modulo 2^16, valid after the second rising edge counting the one that
// samples the inputs, with out_mode equal to the mode of that vector.
// Both modes and mode changes between consecutive vectors are counted.
module tb_hda_dct_cu;
  import hda_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  dct_mode_t mode = MODE_DCT;
  logic signed [16:0] x [4];
  logic [1:0]         ov;
  dct_mode_t          om [2];
  logic signed [15:0] y  [2];
  always #5 clk = ~clk;

  hda_dct_cu #(.IN_W(17), .OUT_W(16), .FRAC(12), .ODD(1'b0), .ROW(1)) dut_e (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .mode(mode), .x(x),
    .out_valid(ov[0]), .out_mode(om[0]), .y(y[0])
  );
  hda_dct_cu #(.IN_W(17), .OUT_W(16), .FRAC(12), .ODD(1'b1), .ROW(2)) dut_o (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .mode(mode), .x(x),
    .out_valid(ov[1]), .out_mode(om[1]), .y(y[1])
  );

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int     q_y [2][$];
  int     q_m [$];
  longint q_t [$];
  int     n_dct = 0, n_idct = 0, n_switch = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DCT matrix entry C[k][n] with 12 fraction bits.
  function automatic int cmat(input int k, input int n);
    real v, a;
    v = 0.5 * $cos(real'(k * (2 * n + 1)) * 3.14159265358979 / 16.0);
    if (k == 0) v = 0.5 / $sqrt(2.0);
    a = (v < 0) ? -v : v;
    return (v < 0) ? -$rtoi(a * 4096.0 + 0.5) : $rtoi(a * 4096.0 + 0.5);
  endfunction

  // Entry used by a unit: odd selects the matrix, row the unit.
  function automatic int acoef(input int odd, input int row, input int idct, input int n);
    return idct ? cmat(2 * n + odd, row) : cmat(2 * row + odd, n);
  endfunction

  always @(posedge clk) begin
    #1;
    if (rst_n && ov[0]) begin
      if (q_m.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        int m;
        longint t;
        m = q_m.pop_front();
        t = q_t.pop_front();
        for (int u = 0; u < 2; u++) begin
          int ey;
          ey = q_y[u].pop_front();
          checks++;
          if (int'(y[u]) != ey || int'(om[u]) != m || cycle != t || ov[1] != 1'b1) begin
            failures++;
            if (failures < 10) $display("FAIL unit %0d mode %0d: y=%0d expected %0d (cycle %0d/%0d)",
                                        u, m, y[u], ey, cycle, t);
          end
        end
      end
    end
  end

  initial begin
    int prev;
    prev = -1;
    for (int n = 0; n < 4; n++) x[n] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 5) == 0) begin
        in_valid = 1'b0;
        continue;
      end
      in_valid = 1'b1;
      mode = dct_mode_t'($urandom_range(0, 1));
      for (int n = 0; n < 4; n++) begin
        x[n] = 17'($urandom);
        if (i < 20) x[n] = (i % 2 == 0) ? 17'sh0ffff : -17'sh10000;
      end
      @(posedge clk);
      #1;
      for (int u = 0; u < 2; u++) begin
        longint s;
        s = 0;
        for (int n = 0; n < 4; n++)
          s += longint'(acoef(u, (u == 0) ? 1 : 2, int'(mode), n)) * longint'(x[n]);
        q_y[u].push_back(int'($signed(16'((s + 2048) >>> 12))));
      end
      q_m.push_back(int'(mode));
      q_t.push_back(cycle + 1);
      if (mode == MODE_DCT) n_dct++; else n_idct++;
      if (prev >= 0 && prev != int'(mode)) n_switch++;
      prev = int'(mode);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(posedge clk);
    #2;
    checks++;
    if (q_m.size() != 0 || n_dct == 0 || n_idct == 0 || n_switch == 0) begin
      failures++;
      $display("FAIL %0d results missing, dct %0d idct %0d switches %0d", q_m.size(), n_dct, n_idct, n_switch);
    end
    $display("DCT vectors %0d, IDCT vectors %0d, mode switches %0d", n_dct, n_idct, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
