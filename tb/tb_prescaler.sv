// tb_prescaler: the counter must count enabled cycles, and rise[k] must be
// high exactly in the enabled cycles after which bit k turns from 0 to 1.
module tb_prescaler;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int W = 6;
  logic clk = 1'b0, rst = 1'b1;
  logic en = 1'b0;
  logic [W-1:0] count, rise, exp_rise, model = '0;
  int checks = 0, failures = 0, rises2 = 0;

  always #5 clk = ~clk;

  prescaler #(.W(W)) dut (.clk, .rst, .en, .count, .rise);

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      en = $urandom % 2;
      #1;
      exp_rise = en ? ((model + 1'b1) & ~model) : '0;
      checks++;
      if (rise !== exp_rise) begin
        failures++;
        $display("FAIL rise %b expected %b count %0d", rise, exp_rise, count);
      end
      if (rise[2]) rises2++;
      @(posedge clk);
      if (en) model = model + 1'b1;
      @(negedge clk);
      checks++;
      if (count !== model) begin
        failures++;
        $display("FAIL count %0d expected %0d", count, model);
      end
    end
    // bit 2 rises once per 8 enabled cycles
    checks++;
    if (rises2 < 100) failures++;
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
