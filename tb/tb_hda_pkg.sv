// tb_hda_pkg -- self-checking test of the variable radix-2 multi-bit coder
//
// Checks hda_pkg::vr2_encode:
//   * every 12-bit two's complement value, and 20000 random 16-bit values,
//     rebuild exactly from their digits (sum of +-2^shift, summed here
//     independently of the package);
//   * no code has more digits than modified Booth recoding would
//     (ceil((w+1)/2) digits for w bits, since every group has at least
//     three bits and moves on by at least two);
//   * digit counts of known values and of the coefficient sets used by the
//     DCT (12 fraction bits) and DWT (10 fraction bits, N = 6 and N = 4)
//     units match an
//     independent model of the same algorithm.
module tb_hda_pkg;
  import hda_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rebuild(input sd_code_t c);
    longint v;
    v = 0;
    for (int i = 0; i < int'(c.count); i++) begin
      if (c.neg[i]) v = v - (longint'(1) << c.shift[i]);
      else          v = v + (longint'(1) << c.shift[i]);
    end
    return v;
  endfunction

  task automatic check_value(input longint y, input int w);
    sd_code_t c;
    c = vr2_encode(y, w);
    checks++;
    if (rebuild(c) != y || int'(c.count) > (w + 2) / 2) begin
      failures++;
      if (failures < 10) $display("FAIL value %0d (w=%0d): rebuilt %0d, %0d digits", y, w, rebuild(c), c.count);
    end
  endtask

  task automatic check_count(input longint y, input int w, input int expected);
    sd_code_t c;
    c = vr2_encode(y, w);
    checks++;
    if (int'(c.count) != expected) begin
      failures++;
      $display("FAIL count of %0d: %0d digits, expected %0d", y, c.count, expected);
    end
  endtask

  initial begin
    int total;
    int dwt_exp [6];
    int dwt4_exp [4];
    longint r;
    dwt_exp  = '{5, 5, 4, 3, 4, 2};
    dwt4_exp = '{3, 5, 4, 3};
    @(posedge clk);
    for (int y = -2048; y < 2048; y++) check_value(longint'(y), 12);
    for (int i = 0; i < 20000; i++) begin
      r = longint'($signed(16'($urandom)));
      check_value(r, 16);
    end
    check_value(-32768, 16);
    check_count(16'h0F0F, 16, 4);
    check_count(32767, 16, 2);
    check_count(-21846, 16, 8);
    check_count(12345, 16, 5);
    check_count(1, 16, 1);
    check_count(-1, 16, 1);
    check_count(0, 16, 0);
    // DCT coefficient set: 32 matrix entries with 12 fraction bits.
    total = 0;
    for (int odd = 0; odd < 2; odd++)
      for (int rr = 0; rr < 4; rr++)
        for (int n = 0; n < 4; n++)
          total += int'(vr2_encode(longint'(dct_coef(odd[0], rr, n, 12)), 13).count);
    checks++;
    if (total != 136) begin
      failures++;
      $display("FAIL DCT partial products %0d, expected 136", total);
    end
    // DWT magnitudes with 10 fraction bits, N = 6 and N = 4.
    for (int j = 0; j < 6; j++) begin
      int m;
      m = round_coef(dwt_h20(6, j), 10);
      m = (m < 0) ? -m : m;
      check_count(longint'(m), $clog2(m + 1) + 1, dwt_exp[j]);
    end
    for (int j = 0; j < 4; j++) begin
      int m;
      m = round_coef(dwt_h20(4, j), 10);
      m = (m < 0) ? -m : m;
      check_count(longint'(m), $clog2(m + 1) + 1, dwt4_exp[j]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
