// tb_sample_hold: random data and hold; the output must equal the last input
// taken while hold was low (one clock of latency).
module tb_sample_hold;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 1'b0, rst = 1'b1;
  logic hold = 1'b0;
  logic [10:0] din = '0, dout, expected;
  int checks = 0, failures = 0, held = 0;

  always #5 clk = ~clk;

  sample_hold dut (.clk, .rst, .hold, .din, .dout);

  initial begin
    expected = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      din  = 11'($urandom);
      hold = ($urandom % 3) == 0;
      @(posedge clk);
      if (!hold) expected = din; else held++;
      @(negedge clk);
      checks++;
      if (dout !== expected) begin
        failures++;
        $display("FAIL i=%0d got %0d expected %0d", i, dout, expected);
      end
    end
    if (held == 0) failures++;
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
