// tb_mems_charge_ctrl_full: one complete compensation step of the controller
// at its default parameters (sequence unit 2**23 low-rate cycles, about
// 0.67 s; 32-sample averaging; 12.5 MHz low rate).
//
// From reset the actuator model charges in sequence I. The test checks that
// the controller stays in sequence I for one full sequence unit, then makes
// the trial switch to sequence II, waits for 32 new averages, sees the
// lower reading and keeps sequence II. It also checks the stored sequence-I
// value against the model's reading and that no ADC glitch passed the
// sample-and-hold. Takes about a minute of simulation time per 0.7 s.
module tb_mems_charge_ctrl_full;
  timeunit 1ns;
  timeprecision 1ps;
  import mems_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [9:0] data_adc;
  logic h, r, d, comp = 1'b0;
  logic [7:0] slide = 8'b11_00_0_000;
  logic [2:0] push = 3'b000;
  logic clk_adc, clk_dacea, cmpout, capture, man, h0, d0_c;
  logic [7:0] bcd_out, leds;
  logic [3:0] bcd_sel;
  logic [4:1] digs;
  logic glitch;
  int q;
  int checks = 0, failures = 0, glitch_blocked = 0;
  realtime t_pre, t_dec;
  logic mon_on = 1'b0;

  always #5 clk = ~clk;

  mems_charge_ctrl dut (
    .clk, .rst, .data_adc, .h_dacea(h), .d_dacea(d), .comp,
    .slide_switch(slide), .push_switch(push),
    .clk_adc, .clk_dacea, .bcd_out, .bcd_sel, .leds, .digs, .cmpout, .capture,
    .man, .h0, .d0_c
  );

  delirium_model u_chip (.clk_dacea, .h, .r, .d);

  mems_model #(.CHARGE_NS(20000)) u_mems (
    .clk, .h, .seq(digs[4]), .charging(1'b1), .clear_charge(1'b0), .data_adc, .glitch, .q
  );

  initial #2us mon_on = 1'b1;

  always @(posedge clk) if (glitch && mon_on) begin
    if (dut.h_pos) glitch_blocked++;
    else begin failures++; $display("FAIL glitch sampled at %0t", $time); end
  end

  initial begin
    repeat (5) @(negedge clk);
    rst = 1'b0;
    wait (dut.u_fsm.state == ST_PRE_SEQ2);
    t_pre = $realtime;
    $display("trial switch at %0.3f ms, q = %0d, capSeqI = %0d", t_pre / 1ms, q, dut.cap_seq1);
    checks++;
    // one unit is 2**23 cycles of 80 ns = 671.1 ms; the switch waits for the
    // next D pulse (20 us period)
    if (t_pre < 671.08ms || t_pre > 671.2ms) begin
      failures++; $display("FAIL sequence period %0.3f ms", t_pre / 1ms);
    end
    checks++;
    if (digs[4] !== 1'b1 || leds[1] !== 1'b0) begin failures++; $display("FAIL pre-state outputs"); end
    checks++;
    // the stored value is the 32-sample mean just before the switch
    if (int'(dut.cap_seq1) < 500 + q - 3 || int'(dut.cap_seq1) > 500 + q + 2) begin
      failures++; $display("FAIL capSeqI %0d for q %0d", dut.cap_seq1, q);
    end
    wait (dut.u_fsm.state != ST_PRE_SEQ2);
    t_dec = $realtime;
    $display("decision after %0.2f us: %s, averaged reading %0d", (t_dec - t_pre) / 1us,
             dut.u_fsm.state.name(), dut.avgs_out);
    checks++;
    if (dut.u_fsm.state != ST_SEQ2) begin failures++; $display("FAIL switch not kept"); end
    checks++;
    // 32 averages take 2.56 us, then the next D pulse
    if (t_dec - t_pre < 2.56us || t_dec - t_pre > 25us) begin
      failures++; $display("FAIL decision time");
    end
    checks++;
    if (glitch_blocked == 0) failures++;
    repeat (1000) @(posedge clk);
    checks++;
    if (digs[4] !== 1'b1 || leds[1] !== 1'b1 || leds[0] !== 1'b1) begin failures++; $display("FAIL seq II outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #800ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
