// tb_dwt_cu -- self-checking test of the Daubechies DWT unit
//
// Streams 4000 random 13-bit samples, with random idle cycles, through
// two units, the default N=6 one and an N=4 one.  The model keeps the
// sample history and computes for sample s
//   s even: y = sum_k R(h(k) * x(s-k)),  s odd: y = sum_k R(g(k) * x(s-k))
// with g(k) = (-1)^k h(N-1-k), h the Daubechies low-pass filter held
// with 10 fraction bits, and R(p) = floor((p + 512) / 1024) wrapped to 16
// bits (each net rounds its own product).  Also checked: the result
// arrives exactly two clock edges after the edge that takes the sample, out_high alternates
// and matches the sample parity, and the result is within 10 of the
// real-valued filter output (rounding the N=4 coefficients to 10 fraction
// bits alone can move a result by about 7).  Mechanisms counted: low- and high-pass
// results, idle gaps, negated net inputs.
module tb_dwt_cu;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [12:0] din = '0;
  logic out_valid [2];
  logic out_high [2];
  logic signed [16:0] dout [2];
  always #5 clk = ~clk;

  dwt_cu dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .din(din),
    .out_valid(out_valid[0]), .out_high(out_high[0]), .dout(dout[0])
  );
  dwt_cu #(.N(4)) dut4 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .din(din),
    .out_valid(out_valid[1]), .out_high(out_high[1]), .dout(dout[1])
  );

  localparam int    NT [2] = '{6, 4};
  localparam int    HQ [2][6] = '{'{341, 826, 471, -138, -87, 36}, '{495, 857, 230, -133, 0, 0}};
  localparam real   HR [2][6] = '{'{0.3326705529500826, 0.8068915093110925, 0.4598775021184915,
                                    -0.1350110200102546, -0.0854412738820267, 0.0352262918857095},
                                  '{0.4829629131445341, 0.8365163037378079, 0.2241438680420134,
                                    -0.1294095225512604, 0.0, 0.0}};
  localparam int    NS = 4000;

  int    hist [NS];
  int    exp_y [2][$];
  int    exp_h [2][$];
  longint exp_t [2][$];
  real   exp_r [2][$];
  longint cycle = 0;
  int    n_low = 0, n_high = 0, n_gap = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(input longint p);
    return int'($signed(16'((p + 512) >>> 10)));
  endfunction

  // Expected result of unit u after sample s.
  task automatic push_expect(input int u, input int s);
    longint y;
    real    yr;
    int     c, x, n;
    n  = NT[u];
    y  = 0;
    yr = 0.0;
    for (int k = 0; k < n; k++) begin
      x = (s - k >= 0) ? hist[s-k] : 0;
      if (s % 2 == 0) begin
        c  = HQ[u][k];
        yr = yr + HR[u][k] * x;
      end else begin
        c  = (k % 2 == 0) ? HQ[u][n-1-k] : -HQ[u][n-1-k];
        yr = yr + ((k % 2 == 0) ? HR[u][n-1-k] : -HR[u][n-1-k]) * x;
      end
      y = y + rnd(longint'(c) * x);
    end
    exp_y[u].push_back(int'($signed(17'(y))));
    exp_h[u].push_back(s % 2);
    exp_t[u].push_back(cycle + 2);
    exp_r[u].push_back(yr);
  endtask

  // Output checker.
  always @(posedge clk) begin
    #1;
    for (int u = 0; u < 2; u++) begin
      if (rst_n && out_valid[u]) begin
        checks++;
        if (exp_y[u].size() == 0) begin
          failures++;
          $display("FAIL unit %0d: unexpected output at cycle %0d", u, cycle);
        end else begin
          int ey, eh;
          longint et;
          real er, d;
          ey = exp_y[u].pop_front();
          eh = exp_h[u].pop_front();
          et = exp_t[u].pop_front();
          er = exp_r[u].pop_front();
          d  = real'(int'(dout[u])) - er;
          if (int'(dout[u]) != ey || int'(out_high[u]) != eh || cycle != et || d > 10.0 || d < -10.0) begin
            failures++;
            if (failures < 10)
              $display("FAIL unit %0d cycle %0d: y=%0d high=%0d, expected %0d high=%0d at cycle %0d (real %f)",
                       u, cycle, dout[u], out_high[u], ey, eh, et, er);
          end
          if (u == 0) begin
            if (out_high[u]) n_high++; else n_low++;
          end
        end
      end
    end
  end

  initial begin
    int s;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    s = 0;
    while (s < NS) begin
      @(negedge clk);
      if ($urandom_range(0, 7) == 0) begin
        in_valid = 1'b0;
        n_gap++;
      end else begin
        in_valid = 1'b1;
        if (s < 8)       din = 13'sd4095;
        else if (s < 16) din = -13'sd4096;
        else             din = 13'($urandom);
        hist[s] = int'(din);
        @(posedge clk);
        #1;
        push_expect(0, s);
        push_expect(1, s);
        s++;
        continue;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (6) @(posedge clk);
    #2;
    checks++;
    if (exp_y[0].size() != 0 || exp_y[1].size() != 0 || n_low != NS / 2 || n_high != NS / 2 || n_gap == 0) begin
      failures++;
      $display("FAIL results missing, low %0d high %0d gaps %0d", n_low, n_high, n_gap);
    end
    $display("low-pass %0d, high-pass %0d, idle gaps %0d", n_low, n_high, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
