// tb_mems_charge_ctrl: end-to-end test of the controller with a model of the
// front-end chip and of a charging actuator.
//
// The top runs with a short sequence period (SEC_LSB = 12, about 330 us per
// sec_time unit); everything else is at its default. The test goes through:
//   1. charging on: the machine must keep switching polarity (switches kept)
//      and the trapped charge must stay bounded;
//   2. charging off: the trial switches must be reverted;
//   3. hysteresis adjustment with push button 0 in display mode 010, and
//      the display showing the new value;
//   4. manual mode with push button 2 setting the polarity;
//   5. the low-duty, high-duty and main (comparator-locked) actuator
//      clocks, each measured;
//   6. the three ADC clock choices, measured by counting edges.
// Throughout, the state may only change in a cycle with D high, no ADC
// glitch may pass the sample-and-hold, and the display must scan all four
// digits. Each mechanism is counted and must have happened.
module tb_mems_charge_ctrl;
  timeunit 1ns;
  timeprecision 1ps;
  import mems_pkg::*;
  localparam int SEC_LSB = 12;

  logic clk = 1'b0, rst = 1'b1;
  logic [9:0] data_adc;
  logic h, r, d, comp;
  logic [7:0] slide = 8'b11_00_0_000;
  logic [2:0] push = 3'b000;
  logic clk_adc, clk_dacea, cmpout, capture, man, h0, d0_c;
  logic [7:0] bcd_out, leds;
  logic [3:0] bcd_sel;
  logic [4:1] digs;
  logic charging = 1'b1, clear_charge = 1'b0, glitch;
  int q;

  int checks = 0, failures = 0;
  int n_kept = 0, n_reverted = 0, n_manual = 0, n_manual_pol = 0, n_glitch_blocked = 0;
  int n_adjust = 0, n_low = 0, n_high = 0, n_main = 0, n_adc_clk = 0, qmax_seen = 0;
  logic [3:0] anodes_seen = '0;

  always #5 clk = ~clk;

  mems_charge_ctrl #(.SEC_LSB(SEC_LSB)) dut (
    .clk, .rst, .data_adc, .h_dacea(h), .d_dacea(d), .comp,
    .slide_switch(slide), .push_switch(push),
    .clk_adc, .clk_dacea, .bcd_out, .bcd_sel, .leds, .digs, .cmpout, .capture,
    .man, .h0, .d0_c
  );

  delirium_model u_chip (.clk_dacea, .h, .r, .d);

  mems_model u_mems (.clk, .h, .seq(digs[4]), .charging, .clear_charge, .data_adc, .glitch, .q);

  task automatic fail(input string what);
    failures++;
    if (failures < 20) $display("FAIL %s at %0t", what, $time);
  endtask

  // ---------------- monitors ----------------
  seq_state_t st_prev;
  bit         trace = 1'b0;
  initial trace = $test$plusargs("trace");
  logic       mon_on = 1'b0;  // glitch check from 2 us after reset
  initial #2us mon_on = 1'b1;
  logic       move_ok;
  always @(posedge clk) begin
    if (!rst) begin
      // state moves only with D high in an enabled cycle
      if (dut.u_fsm.state != st_prev && !move_ok) fail("state moved without D");
      if (dut.u_fsm.state != st_prev && trace)
        $display("%0t %s -> %s q=%0d avg=%0d c1=%0d", $time, st_prev.name(),
                 dut.u_fsm.state.name(), q, dut.avgs_out, dut.cap_seq1);
      if (st_prev == ST_PRE_SEQ2 && dut.u_fsm.state == ST_SEQ2) n_kept++;
      if (st_prev == ST_PRE_SEQ1 && dut.u_fsm.state == ST_SEQ1) n_kept++;
      if (st_prev == ST_PRE_SEQ2 && dut.u_fsm.state == ST_SEQ1) n_reverted++;
      if (st_prev == ST_PRE_SEQ1 && dut.u_fsm.state == ST_SEQ2) n_reverted++;
      if (st_prev != ST_MANUAL && dut.u_fsm.state == ST_MANUAL) n_manual++;
      // the sample-and-hold must be frozen whenever the ADC shows a glitch
      if (glitch && mon_on) begin
        if (dut.h_pos) n_glitch_blocked++;
        else fail($sformatf("glitch sampled h=%0b hh=%0d hl=%0d", h, u_mems.h_high, u_mems.h_low));
      end
      if (q > qmax_seen) qmax_seen = q;
      if (-q > qmax_seen) qmax_seen = -q;
      for (int k = 0; k < 4; k++) if (!bcd_sel[k]) anodes_seen[k] = 1'b1;
    end
    st_prev <= dut.u_fsm.state;
    move_ok <= d && dut.lf_en;
  end

  // comparator model for the main pattern: high for 16 fast cycles starting
  // 320 fast cycles (40 low-rate cycles) after the actuator clock went low.
  // It follows the level of clk_dacea, so it cannot miss a falling edge.
  int low_cycles = 0;
  always @(posedge clk) low_cycles <= clk_dacea ? 0 : low_cycles + 1;
  assign comp = (low_cycles >= 320) && (low_cycles < 336);

  task automatic wait_periods(input int n);
    repeat (n) #(real'(2 ** SEC_LSB) * 80.0 * 1.0);
  endtask

  task automatic wait_sample();  // two switch-sampling intervals
    repeat (2 * (2 ** 14) * 8 + 100) @(posedge clk);
  endtask

  int highs, edges, kept_before, rev_before;
  int adc_edges = 0;
  always @(posedge clk_adc) adc_edges++;

  task automatic measure_pattern(input int lf_cycles);
    highs = 0;
    repeat (lf_cycles) begin
      repeat (8) @(posedge clk);
      if (clk_dacea) highs++;
    end
  endtask

  task automatic count_adc_edges();
    int start;
    start = adc_edges;
    repeat (800) @(posedge clk);
    edges = adc_edges - start;
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst = 1'b0;

    // 1. charging: the machine must follow the charge
    wait_periods(10);
    checks++;
    if (n_kept < 4) fail($sformatf("only %0d kept switches with charging", n_kept));
    checks++;
    // one sequence unit (~330 us) moves q by ~80 codes; it must stay near that
    if (qmax_seen > 200) fail($sformatf("charge not bounded: %0d", qmax_seen));
    $display("phase 1: kept %0d reverted %0d, max |q| %0d", n_kept, n_reverted, qmax_seen);

    // 2. no charging: trial switches find no difference and are reverted
    charging = 1'b0; clear_charge = 1'b1;
    wait_periods(1);
    clear_charge = 1'b0;
    rev_before = n_reverted; kept_before = n_kept;
    wait_periods(6);
    checks++;
    if (n_reverted - rev_before < 3) fail("trial switches not reverted");
    checks++;
    if (n_kept != kept_before) fail("switch kept without charge");
    $display("phase 2: reverted %0d", n_reverted - rev_before);

    // 3. hysteresis adjustment: display mode 010, hold push button 0
    slide[2:0] = 3'b010;
    push[0] = 1'b1;
    wait_sample();
    wait (dut.data_interval == 10'd11);
    push[0] = 1'b0;
    n_adjust++;
    wait_sample();
    checks++;
    if (dut.data_interval != 10'd11) fail("interval not 11");
    checks++;
    if (dut.disp_value != 16'h000B) fail($sformatf("display %h", dut.disp_value));
    slide[2:0] = 3'b000;

    // 4. manual mode
    slide[3] = 1'b1;
    wait_sample();
    repeat (3) @(posedge d);
    repeat (10) @(posedge clk);
    checks++;
    if (dut.u_fsm.state != ST_MANUAL) fail("manual not entered");
    push[2] = 1'b1;
    wait_sample();
    checks++;
    if (digs[4] !== 1'b1) fail("manual polarity II"); else n_manual_pol++;
    push[2] = 1'b0;
    wait_sample();
    checks++;
    if (digs[4] !== 1'b0) fail("manual polarity I"); else n_manual_pol++;
    slide[3] = 1'b0;
    wait_sample();
    repeat (3) @(posedge d);
    repeat (10) @(posedge clk);
    checks++;
    if (dut.u_fsm.state != ST_SEQ1) fail("manual not left");

    // 5. actuator clock patterns
    slide[7:6] = 2'b01;
    wait_sample();
    measure_pattern(2048);
    checks++;
    if (highs != 6) fail($sformatf("low duty: %0d high of 2048", highs)); else n_low++;
    slide[7:6] = 2'b10;
    wait_sample();
    measure_pattern(1024);
    checks++;
    if (highs != 1024 - 96) fail($sformatf("high duty: %0d high of 1024", highs)); else n_high++;
    slide[7:6] = 2'b00;
    wait_sample();
    // main pattern: high phases of halfperiod (27) low-rate cycles
    repeat (3) begin
      int len;
      @(posedge clk_dacea);
      len = 0;
      while (clk_dacea) begin @(posedge clk); len++; end
      checks++;
      if (len < 27 * 8 - 1 || len > 27 * 8 + 1) fail($sformatf("main pattern high %0d fast cycles", len)); else n_main++;
    end
    slide[7:6] = 2'b11;

    // 6. ADC clock selection
    slide[5:4] = 2'b01;
    wait_sample();
    count_adc_edges();
    checks++;
    if (edges < 99 || edges > 101) fail($sformatf("adc clock low rate: %0d", edges)); else n_adc_clk++;
    slide[5:4] = 2'b10;
    wait_sample();
    count_adc_edges();
    checks++;
    if (edges < 399 || edges > 401) fail($sformatf("adc clock 50 MHz: %0d", edges)); else n_adc_clk++;
    slide[5:4] = 2'b00;
    wait_sample();
    count_adc_edges();
    checks++;
    if (edges < 799 || edges > 801) fail($sformatf("adc clock 100 MHz: %0d", edges)); else n_adc_clk++;

    // mechanism counts
    $display("kept %0d reverted %0d manual %0d manual-polarity %0d glitches blocked %0d",
             n_kept, n_reverted, n_manual, n_manual_pol, n_glitch_blocked);
    $display("adjust %0d low %0d high %0d main %0d adc-clock %0d anodes %b",
             n_adjust, n_low, n_high, n_main, n_adc_clk, anodes_seen);
    checks += 10;
    if (n_kept == 0)           fail("no kept switch");
    if (n_reverted == 0)       fail("no reverted switch");
    if (n_manual == 0)         fail("no manual entry");
    if (n_manual_pol < 2)      fail("no manual polarity change");
    if (n_glitch_blocked == 0) fail("no glitch blocked");
    if (n_adjust == 0)         fail("no adjustment");
    if (n_low == 0 || n_high == 0) fail("test patterns");
    if (n_main == 0)           fail("main pattern");
    if (n_adc_clk < 3)         fail("adc clock select");
    if (anodes_seen != 4'hF)   fail("display scan");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
