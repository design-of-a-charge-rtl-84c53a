// tb_seq_timer: with SEC_LSB = 3 one sec_time unit is 8 enabled cycles. The
// timer must report expired after exactly 8*sec_time enabled cycles, hold
// there until D is seen in an enabled cycle, then restart from zero; manual
// mode keeps it cleared.
module tb_seq_timer;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int SEC_LSB = 3;
  logic clk = 1'b0, rst = 1'b1;
  logic en = 1'b0, manual = 1'b0, d_dacea = 1'b0;
  logic [3:0] sec_time = 4'd2;
  logic expired;
  logic [SEC_LSB+3:0] count;
  int checks = 0, failures = 0;
  int n;

  always #5 clk = ~clk;

  seq_timer #(.SEC_LSB(SEC_LSB)) dut (.*);

  task automatic enabled_cycle();
    en = 1'b1; @(negedge clk); en = 1'b0;
    repeat ($urandom % 3) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int round = 0; round < 4; round++) begin
      sec_time = 4'(1 + round);
      n = 0;
      while (!expired && n < 1000) begin enabled_cycle(); n++; end
      checks++;
      if (n != 8 * (1 + round) - (round == 0 ? 0 : 0)) begin
        failures++;
        $display("FAIL round %0d expired after %0d cycles", round, n);
      end
      // stays expired without D
      repeat (5) enabled_cycle();
      checks++;
      if (!expired) failures++;
      // D outside an enabled cycle does nothing
      d_dacea = 1'b1; @(negedge clk); d_dacea = 1'b0;
      checks++;
      if (!expired) failures++;
      d_dacea = 1'b1; enabled_cycle(); d_dacea = 1'b0;
      checks++;
      if (count !== '0) begin failures++; $display("FAIL not cleared by D"); end
    end
    // manual mode clears
    sec_time = 4'd3;
    repeat (5) enabled_cycle();
    manual = 1'b1;
    enabled_cycle();
    checks++;
    if (count !== '0) failures++;
    repeat (5) enabled_cycle();
    checks++;
    if (count !== '0) failures++;
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
