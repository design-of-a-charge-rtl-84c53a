// tb_control_panel: switch sampling, the five adjustable settings with their
// steps, limits and rates, the halfperiod step acceleration and the display
// source select. The rate pulses are driven directly, one cycle wide.
module tb_control_panel;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 1'b0, rst = 1'b1;
  logic en = 1'b1, sample = 1'b0, adj_sec = 1'b0, adj_pattern = 1'b0, adj_interval = 1'b0;
  logic [7:0]  slide_switch = '0;
  logic [2:0]  push_switch = '0;
  logic [10:0] cap_seq1 = 11'h123, cap_seq2 = 11'h456;
  logic [7:0]  slide_filt;
  logic [2:0]  push_filt;
  logic [3:0]  sec_time;
  logic [9:0]  data_interval, duty_cycle, pattern_period;
  logic [12:0] halfperiod;
  logic [15:0] disp_value;
  logic [3:0]  disp_dots;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  control_panel dut (.*);

  task automatic pulse(ref logic p);
    @(negedge clk); p = 1'b1; @(negedge clk); p = 1'b0;
  endtask

  task automatic set_inputs(input logic [7:0] sw, input logic [2:0] pb);
    slide_switch = sw; push_switch = pb;
    pulse(sample);
  endtask

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic expect_disp(input int exp, input string what);
    @(negedge clk); @(negedge clk);
    expect_eq(int'(disp_value), exp, what);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // defaults
    expect_eq(sec_time, 1, "sec_time default");
    expect_eq(data_interval, 10, "interval default");
    expect_eq(halfperiod, 27, "halfperiod default");
    expect_eq(duty_cycle, 10, "duty default");
    expect_eq(pattern_period, 250, "period default");
    // inputs are taken only on the sample pulse
    slide_switch = 8'hA5; push_switch = 3'b101;
    repeat (3) @(negedge clk);
    expect_eq(slide_filt, 0, "no sample yet");
    pulse(sample);
    expect_eq(slide_filt, 8'hA5, "sampled switches");
    expect_eq(push_filt, 3'b101, "sampled buttons");
    // display mode 000: captured values, refreshed on adj_sec
    set_inputs(8'h00, 3'b000);
    pulse(adj_sec);
    expect_disp(16'h5623, "caps display");
    // sec_time: mode 001, +1 per adj_sec pulse, wraps in 4 bits
    set_inputs(8'h01, 3'b001);
    repeat (3) pulse(adj_sec);
    expect_eq(sec_time, 4, "sec_time up");
    pulse(adj_pattern); pulse(adj_interval);
    expect_eq(sec_time, 4, "sec_time other rates");
    expect_disp(4, "sec_time display");
    set_inputs(8'h01, 3'b010);
    repeat (6) pulse(adj_sec);
    expect_eq(sec_time, 14, "sec_time down wraps");
    // data_interval: mode 010, on adj_interval, 0..512
    set_inputs(8'h02, 3'b010);
    repeat (12) pulse(adj_interval);
    expect_eq(data_interval, 0, "interval floor");
    set_inputs(8'h02, 3'b001);
    repeat (5) pulse(adj_interval);
    expect_eq(data_interval, 5, "interval up");
    expect_disp(5, "interval display");
    // halfperiod: mode 011, accelerating step 1,2,3,... on adj_sec
    set_inputs(8'h03, 3'b000);
    pulse(adj_sec);               // releases: step back to 1
    set_inputs(8'h03, 3'b001);
    repeat (4) pulse(adj_sec);    // +1 +2 +3 +4
    expect_eq(halfperiod, 27 + 10, "halfperiod accelerating");
    set_inputs(8'h03, 3'b000);
    pulse(adj_sec);
    set_inputs(8'h03, 3'b010);
    pulse(adj_sec);               // -1
    expect_eq(halfperiod, 36, "halfperiod down");
    expect_disp(36, "halfperiod display");
    // duty_cycle: mode 100, +-10 on adj_pattern, floor 1
    set_inputs(8'h04, 3'b001);
    repeat (2) pulse(adj_pattern);
    expect_eq(duty_cycle, 30, "duty up");
    set_inputs(8'h04, 3'b010);
    repeat (5) pulse(adj_pattern);
    expect_eq(duty_cycle, 1, "duty floor");
    pulse(adj_sec);
    expect_eq(duty_cycle, 1, "duty other rate");
    // pattern_period: mode 101, +-125, ceiling 1023
    set_inputs(8'h05, 3'b001);
    repeat (9) pulse(adj_pattern);
    expect_eq(pattern_period, 1023, "period ceiling");
    set_inputs(8'h05, 3'b010);
    pulse(adj_pattern);
    expect_eq(pattern_period, 898, "period down");
    expect_disp(898, "period display");
    // other modes show E00E and change nothing
    set_inputs(8'h07, 3'b001);
    pulse(adj_sec); pulse(adj_pattern); pulse(adj_interval);
    expect_disp(16'hE00E, "mode 7 display");
    expect_eq(sec_time, 14, "mode 7 sec_time");
    expect_eq(data_interval, 5, "mode 7 interval");
    expect_eq(disp_dots, 0, "dots");
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
