// tb_comp42 -- self-checking test of the 4:2 compressor
//
// Every combination of four 4-bit operands (65536 cases) and 20000 random
// 16-bit ones: sum + carry must equal a + b + c + d modulo 2^W, and the
// carry vector's LSB must be 0 (it arrives already shifted).
module tb_comp42;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]  a4, b4, c4, d4, s4, k4;
  logic [15:0] a, b, c, d, s, k;

  comp42 #(.W(4))  dut4  (.a(a4), .b(b4), .c(c4), .d(d4), .sum(s4), .carry(k4));
  comp42 #(.W(16)) dut16 (.a(a), .b(b), .c(c), .d(d), .sum(s), .carry(k));

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      {a4, b4, c4, d4} = 16'(i);
      #1;
      checks++;
      if (4'(s4 + k4) != 4'(a4 + b4 + c4 + d4) || k4[0]) begin
        failures++;
        if (failures < 10) $display("FAIL W=4 %h %h %h %h -> %h %h", a4, b4, c4, d4, s4, k4);
      end
    end
    for (int i = 0; i < 20000; i++) begin
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom); d = 16'($urandom);
      #1;
      checks++;
      if (16'(s + k) != 16'(a + b + c + d) || k[0]) begin
        failures++;
        if (failures < 10) $display("FAIL W=16 %h %h %h %h -> %h %h", a, b, c, d, s, k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
