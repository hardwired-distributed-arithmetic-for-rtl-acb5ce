// tb_hda_coef_net -- self-checking test of the hardwired coefficient net
//
// Four nets with the DWT coefficient magnitudes 341, 826, 471 and 36 (10
// fraction bits) get 5000 random 16-bit inputs plus the extreme values.
// One cycle after a value is registered each output must equal
// floor((x * C + 512) / 1024) modulo 2^16, computed here with ordinary
// multiplication.  Cycles with en low must leave the outputs unchanged.
module tb_hda_coef_net;
  localparam int NC = 4;
  localparam int C [NC] = '{341, 826, 471, 36};

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic signed [15:0] x = '0;
  logic signed [15:0] y [NC];
  always #5 clk = ~clk;

  for (genvar i = 0; i < NC; i++) begin : g_dut
    hda_coef_net #(.IN_W(16), .OUT_W(16), .FRAC(10), .COEF(C[i]), .NPP(5)) dut (
      .clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y[i])
    );
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] model(input logic signed [15:0] xv, input int c);
    longint p;
    p = longint'(xv) * longint'(c) + 512;
    return 16'(p >>> 10);
  endfunction

  task automatic apply(input logic signed [15:0] xv);
    @(negedge clk);
    x  = xv;
    en = 1'b1;
    @(posedge clk);
    #1;
    for (int i = 0; i < NC; i++) begin
      checks++;
      if (y[i] !== model(xv, C[i])) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d C=%0d: y=%0d expected %0d", xv, C[i], y[i], $signed(model(xv, C[i])));
      end
    end
  endtask

  initial begin
    logic signed [15:0] last;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    apply(16'sh7fff);
    apply(-16'sh8000);
    apply(16'sd0);
    apply(-16'sd1);
    for (int i = 0; i < 5000; i++) apply(16'($urandom));
    // en low: the input register holds.
    last = x;
    @(negedge clk);
    en = 1'b0;
    x  = ~last;
    repeat (3) @(posedge clk);
    #1;
    for (int i = 0; i < NC; i++) begin
      checks++;
      if (y[i] !== model(last, C[i])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
