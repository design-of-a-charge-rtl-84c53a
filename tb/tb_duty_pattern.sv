// tb_duty_pattern: with the enable always on, one period lasts
// pattern_period + 1 cycles with duty_cycle cycles high. Checked by
// measuring whole periods at several settings, including the defaults
// (10 of 251) of the controller.
module tb_duty_pattern;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 1'b0, rst = 1'b1;
  logic en = 1'b1;
  logic [9:0] duty, period;
  logic out;
  int checks = 0, failures = 0;
  int highs, len;

  always #5 clk = ~clk;

  duty_pattern dut (.clk, .rst, .en, .duty_cycle(duty), .pattern_period(period), .out_pattern(out));

  task automatic measure(input int d, input int p);
    duty = 10'(d); period = 10'(p);
    // resynchronise: wait for a rising output edge
    @(negedge clk); while (out) @(negedge clk);
    while (!out) @(negedge clk);
    repeat (3) begin
      highs = 0; len = 0;
      while (out)  begin highs++; len++; @(negedge clk); end
      while (!out) begin len++; @(negedge clk); end
      checks += 2;
      if (highs != d)     begin failures++; $display("FAIL duty %0d/%0d high %0d", d, p, highs); end
      if (len != p + 1)   begin failures++; $display("FAIL period %0d/%0d len %0d", d, p, len); end
    end
  endtask

  initial begin
    duty = 10'd10; period = 10'd250;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    measure(10, 250);
    measure(3, 9);
    measure(50, 125);
    measure(1, 2);
    // enable gating: with en low nothing moves
    en = 1'b0;
    begin
      logic o;
      o = out;
      repeat (50) @(negedge clk);
      checks++;
      if (out !== o) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
