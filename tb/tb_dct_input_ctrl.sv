// tb_dct_input_ctrl -- self-checking test of the DCT input control block
//
// 5000 random vectors of eight 16-bit values in each mode.  DCT mode:
// even[n] = x[n] + x[7-n], odd[n] = x[n] - x[7-n] at full 17-bit precision.
// IDCT mode: even[r] = x[2r], odd[r] = x[2r+1].
module tb_dct_input_ctrl;
  import hda_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  dct_mode_t          mode;
  logic signed [15:0] x    [8];
  logic signed [16:0] even [4];
  logic signed [16:0] odd  [4];

  dct_input_ctrl #(.W(16)) dut (.mode(mode), .x(x), .even(even), .odd(odd));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ee, oo;
    for (int i = 0; i < 10000; i++) begin
      mode = (i % 2 == 0) ? MODE_DCT : MODE_IDCT;
      for (int k = 0; k < 8; k++) x[k] = 16'($urandom);
      if (i == 0) for (int k = 0; k < 8; k++) x[k] = (k < 4) ? 16'sh7fff : -16'sh8000;
      #1;
      for (int n = 0; n < 4; n++) begin
        if (mode == MODE_DCT) begin
          ee = int'(x[n]) + int'(x[7-n]);
          oo = int'(x[n]) - int'(x[7-n]);
        end else begin
          ee = int'(x[2*n]);
          oo = int'(x[2*n+1]);
        end
        checks++;
        if (int'(even[n]) != ee || int'(odd[n]) != oo) begin
          failures++;
          if (failures < 10) $display("FAIL mode %0d n=%0d: %0d %0d expected %0d %0d", mode, n, even[n], odd[n], ee, oo);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
