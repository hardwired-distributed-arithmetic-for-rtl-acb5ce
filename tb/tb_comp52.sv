// tb_comp52 -- self-checking test of the 5:2 compressor
//
// Every combination of five 3-bit operands (32768 cases) and 20000 random
// 16-bit ones: sum + carry must equal a + b + c + d + e modulo 2^W, and the
// carry vector's LSB must be 0 (it arrives already shifted).
module tb_comp52;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [2:0]  a4, b4, c4, d4, e4, s4, k4;
  logic [15:0] a, b, c, d, e, s, k;

  comp52 #(.W(3))  dut4  (.a(a4), .b(b4), .c(c4), .d(d4), .e(e4), .sum(s4), .carry(k4));
  comp52 #(.W(16)) dut16 (.a(a), .b(b), .c(c), .d(d), .e(e), .sum(s), .carry(k));

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32768; i++) begin
      {a4, b4, c4, d4, e4} = 15'(i);
      #1;
      checks++;
      if (3'(s4 + k4) != 3'(a4 + b4 + c4 + d4 + e4) || k4[0]) begin
        failures++;
        if (failures < 10) $display("FAIL W=3 %h %h %h %h %h -> %h %h", a4, b4, c4, d4, e4, s4, k4);
      end
    end
    for (int i = 0; i < 20000; i++) begin
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom); d = 16'($urandom);
      e = 16'($urandom);
      #1;
      checks++;
      if (16'(s + k) != 16'(a + b + c + d + e) || k[0]) begin
        failures++;
        if (failures < 10) $display("FAIL W=16 %h %h %h %h -> %h %h", a, b, c, d, s, k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
