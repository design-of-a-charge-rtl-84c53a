// tb_avg_counter: with AVGS = 3 the flag must toggle exactly 8 enabled cycles
// after every change of seq (and after reset in sequence I), and hold its
// value while seq is unchanged; manual mode clears it.
module tb_avg_counter;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int AVGS = 3;
  logic clk = 1'b0, rst = 1'b1;
  logic en = 1'b0, manual = 1'b0, seq = 1'b0;
  logic flag;
  int checks = 0, failures = 0;
  int n;

  always #5 clk = ~clk;

  avg_counter #(.AVGS(AVGS)) dut (.*);

  task automatic enabled_cycle();
    en = 1'b1; @(negedge clk); en = 1'b0;
    repeat ($urandom % 2) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 6; k++) begin
      // wait for the flag to reach the value that ends this sequence's wait
      n = 0;
      while (flag !== !seq && n < 100) begin enabled_cycle(); n++; end
      checks++;
      if (n != 8) begin failures++; $display("FAIL seq=%0b flag after %0d", seq, n); end
      repeat (20) enabled_cycle();
      checks++;
      if (flag !== !seq) begin failures++; $display("FAIL flag not held"); end
      seq = ~seq;
    end
    manual = 1'b1;
    enabled_cycle();
    checks++;
    if (flag !== 1'b0) failures++;
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
