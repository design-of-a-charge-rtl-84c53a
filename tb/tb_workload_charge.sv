// tb_workload_charge: the controller's main task on a charging actuator,
// with hysteresis 0 and above 0, and with charge added from outside.
//
// The top runs with a short sequence period (SEC_LSB = 12, one sec_time unit
// = 4096 low-rate cycles = 327.68 us). The actuator model charges by one ADC
// code every 20 us, about 16 codes per period. The measured codes of the two
// polarities then differ by 2q, so a trial switch is kept when
// 2q > data_interval. The setting is forced on the internal net, because
// stepping it with the buttons takes 168 ms per step.
//
//   A. data_interval = 0: every trial that finds a difference is kept, so
//      the polarity alternates every period (sequence select near 50% duty)
//      and the charge stays within one period of charging (|q| <= 24).
//   B. data_interval = 40: a switch needs q > 20, so the machine makes
//      short trial switches that are reverted, and the charge settles at a
//      larger but still bounded level (21 <= max |q| <= 45) with at least as
//      many reverted trials as kept switches.
//   C. charge of +150 and then -150 codes is added at once. Each time the
//      machine must move to the polarity that works it off and bring |q|
//      back under 45 within 14 periods, spending most of that time in the
//      discharging polarity.
// Every mechanism (kept, reverted, recovery from each sign) is counted and
// must have happened. The state may change only with D high.
module tb_workload_charge;
  timeunit 1ns;
  timeprecision 1ps;
  import mems_pkg::*;
  localparam int  SEC_LSB   = 12;
  localparam real PERIOD_NS = real'(2 ** SEC_LSB) * 80.0;

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
  int   q;

  int checks = 0, failures = 0;
  int n_kept = 0, n_reverted = 0, n_recovered_pos = 0, n_recovered_neg = 0;
  int qmax = 0, cycles_seq2 = 0, cycles_all = 0;

  always #5 clk = ~clk;

  mems_charge_ctrl #(.SEC_LSB(SEC_LSB)) dut (
    .clk, .rst, .data_adc, .h_dacea(h), .d_dacea(d), .comp,
    .slide_switch(slide), .push_switch(push),
    .clk_adc, .clk_dacea, .bcd_out, .bcd_sel, .leds, .digs, .cmpout, .capture,
    .man, .h0, .d0_c
  );

  delirium_model u_chip (.clk_dacea, .h, .r, .d);

  mems_model #(.CHARGE_NS(20000)) u_mems (
    .clk, .h, .seq(digs[4]), .charging(1'b1), .clear_charge(1'b0),
    .data_adc, .glitch, .q
  );

  task automatic fail(input string what);
    failures++;
    if (failures < 20) $display("FAIL %s at %0t", what, $time);
  endtask

  seq_state_t st_prev;
  bit         trace = 1'b0;
  initial trace = $test$plusargs("trace");
  logic       move_ok;
  always @(posedge clk) begin
    if (!rst) begin
      if (dut.u_fsm.state != st_prev && !move_ok) fail("state moved without D");
      if (dut.u_fsm.state != st_prev && trace)
        $display("%0t %s -> %s q=%0d avg=%0d c1=%0d c2=%0d", $time, st_prev.name(), dut.u_fsm.state.name(),
                 q, dut.avgs_out, dut.cap_seq1, dut.cap_seq2);
      if (st_prev == ST_PRE_SEQ2 && dut.u_fsm.state == ST_SEQ2) n_kept++;
      if (st_prev == ST_PRE_SEQ1 && dut.u_fsm.state == ST_SEQ1) n_kept++;
      if (st_prev == ST_PRE_SEQ2 && dut.u_fsm.state == ST_SEQ1) n_reverted++;
      if (st_prev == ST_PRE_SEQ1 && dut.u_fsm.state == ST_SEQ2) n_reverted++;
      if (q > qmax)  qmax = q;
      if (-q > qmax) qmax = -q;
      cycles_all++;
      if (digs[4]) cycles_seq2++;
    end
    st_prev <= dut.u_fsm.state;
    move_ok <= d && dut.lf_en;
  end

  task automatic wait_periods(input int n);
    repeat (n) #(PERIOD_NS);
  endtask

  task automatic reset_stats();
    n_kept = 0; n_reverted = 0; qmax = 0; cycles_seq2 = 0; cycles_all = 0;
  endtask

  // add charge and wait for the machine to work it off
  task automatic recover(input int dq, output logic ok);
    int waited;
    u_mems.q = u_mems.q + dq;
    cycles_seq2 = 0; cycles_all = 0;
    ok = 1'b0;
    waited = 0;
    while (waited < 14 && !ok) begin
      wait_periods(1);
      waited++;
      if (q <= 45 && q >= -45) ok = 1'b1;
    end
    $display("added %0d: back under 45 after %0d periods, in sequence II %0d%% of the time",
             dq, waited, 100 * cycles_seq2 / cycles_all);
    checks++;
    if (!ok) fail($sformatf("charge %0d not worked off", q));
    checks++;
    // positive charge is removed in sequence II, negative in sequence I
    if (dq > 0 && 2 * cycles_seq2 < cycles_all) fail("did not stay in sequence II");
    if (dq < 0 && 2 * cycles_seq2 > cycles_all) fail("did not stay in sequence I");
  endtask

  initial begin
    logic ok;
    force dut.data_interval = 10'd0;
    repeat (5) @(negedge clk);
    rst = 1'b0;

    // A. no hysteresis. The switches are first sampled 1.3 ms after reset;
    // until then the comparator-locked pattern (comp never comes) gives D
    // only on its lock time-out, so the first period is long. Let the charge
    // of that start be worked off before measuring.
    wait_periods(10);
    reset_stats();
    wait_periods(12);
    $display("A interval 0 : kept %0d reverted %0d max |q| %0d, sequence II %0d%%",
             n_kept, n_reverted, qmax, 100 * cycles_seq2 / cycles_all);
    checks++;
    if (n_kept < 10) fail("interval 0: polarity not alternating every period");
    checks++;
    if (qmax > 24) fail($sformatf("interval 0: charge %0d not held down", qmax));
    checks++;
    if (100 * cycles_seq2 / cycles_all < 40 || 100 * cycles_seq2 / cycles_all > 60)
      fail("interval 0: sequence select not near 50% duty");

    // B. hysteresis of 40 codes
    force dut.data_interval = 10'd40;
    wait_periods(4);
    reset_stats();
    wait_periods(20);
    $display("B interval 40: kept %0d reverted %0d max |q| %0d", n_kept, n_reverted, qmax);
    checks++;
    if (n_kept < 2) fail("interval 40: too few kept switches");
    checks++;
    if (n_reverted < n_kept) fail("interval 40: trial switches not reverted");
    checks++;
    if (qmax < 21 || qmax > 45) fail($sformatf("interval 40: max |q| %0d", qmax));

    // C. artificial charge of both signs, hysteresis back to its default
    force dut.data_interval = 10'd10;
    wait_periods(2);
    recover(150, ok);
    if (ok) n_recovered_pos++;
    wait_periods(2);
    recover(-150, ok);
    if (ok) n_recovered_neg++;

    checks++;
    if (n_recovered_pos == 0 || n_recovered_neg == 0) fail("recovery not seen for both signs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
