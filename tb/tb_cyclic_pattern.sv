// tb_cyclic_pattern: a random 16-bit pattern must come out from bit 15 down
// to bit 0 and repeat, one bit per enabled cycle; the controller's 1024-bit
// low-duty pattern (3 ones) must give exactly 3 high cycles per 1024.
module tb_cyclic_pattern;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 1'b0, rst = 1'b1;
  logic en = 1'b0;
  logic [15:0] pat16;
  logic b16, b1k;
  int checks = 0, failures = 0;
  int idx, ones;

  always #5 clk = ~clk;

  cyclic_pattern #(.N(16))   dut16 (.clk, .rst, .en, .pattern(pat16), .b(b16));
  cyclic_pattern #(.N(1024)) dut1k (.clk, .rst, .en(1'b1), .pattern(1024'h7), .b(b1k));

  initial begin
    pat16 = 16'($urandom);
    repeat (2) @(negedge clk);
    rst = 1'b0;
    idx = 15;
    checks++;
    if (b16 !== pat16[15]) failures++;
    for (int i = 0; i < 400; i++) begin
      en = ($urandom % 3) != 0;
      @(posedge clk);
      if (en) idx = (idx == 0) ? 15 : idx - 1;
      @(negedge clk);
      checks++;
      if (b16 !== pat16[idx]) begin
        failures++;
        $display("FAIL i=%0d idx=%0d got %0b", i, idx, b16);
      end
    end
    ones = 0;
    repeat (2048) begin @(negedge clk); if (b1k) ones++; end
    checks++;
    if (ones != 6) begin failures++; $display("FAIL low-duty ones %0d in 2048", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
