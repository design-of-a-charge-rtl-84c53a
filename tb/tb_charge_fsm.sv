// tb_charge_fsm: drives the sequence machine through every transition.
//
// The enable is always on; D pulses are single cycles. Checked: the state
// only moves in a cycle with D high; SEQ1 -> PRE_SEQ2 on expiry; PRE_SEQ2
// waits for the averaging flag, then goes to SEQ2 if the new mean is lower
// than the stored sequence-I value by more than data_interval and back to
// SEQ1 otherwise (including the equal-to-interval edge case); the mirror
// image from SEQ2; MANUAL from SEQ1 and SEQ2 and back to SEQ1; seq and led
// outputs in each state.
module tb_charge_fsm;
  timeunit 1ns;
  timeprecision 1ps;
  import mems_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic en = 1'b1, d_dacea = 1'b0, manual = 1'b0, push_seq = 1'b0, blink = 1'b0;
  logic expired = 1'b0, avg_flag = 1'b1;
  logic [10:0] avgs_out = '0, cap_seq1 = '0, cap_seq2 = '0;
  logic [9:0] data_interval = 10'd10;
  seq_state_t state;
  logic seq, led;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  charge_fsm dut (.*);

  task automatic d_pulse();
    @(negedge clk); d_dacea = 1'b1; @(negedge clk); d_dacea = 1'b0;
  endtask

  task automatic expect_state(input seq_state_t s, input logic sq, input logic ld, input string what);
    checks++;
    if (state !== s || seq !== sq || led !== ld) begin
      failures++;
      $display("FAIL %s: state %s seq %0b led %0b, expected %s %0b %0b",
               what, state.name(), seq, led, s.name(), sq, ld);
    end
  endtask

  // From SEQ1, make a trial switch and decide with the given values.
  task automatic trial_from_seq1(input int now, input int stored, input seq_state_t result);
    cap_seq1 = 11'(stored);
    expired = 1'b1;
    repeat (3) @(negedge clk);
    expect_state(ST_SEQ1, 1'b0, 1'b1, "waits for D");
    d_pulse();
    expired = 1'b0;
    expect_state(ST_PRE_SEQ2, 1'b1, 1'b0, "pre_seq2");
    avg_flag = 1'b1;           // not yet averaged
    avgs_out = 11'(now);
    d_pulse();
    expect_state(ST_PRE_SEQ2, 1'b1, 1'b0, "pre_seq2 waits for averages");
    avg_flag = 1'b0;
    repeat (2) @(negedge clk);
    expect_state(ST_PRE_SEQ2, 1'b1, 1'b0, "pre_seq2 waits for D");
    d_pulse();
    expect_state(result, result == ST_SEQ2, 1'b1, $sformatf("decision %0d vs %0d", now, stored));
  endtask

  task automatic trial_from_seq2(input int now, input int stored, input seq_state_t result);
    cap_seq2 = 11'(stored);
    expired = 1'b1;
    d_pulse();
    expired = 1'b0;
    expect_state(ST_PRE_SEQ1, 1'b0, 1'b0, "pre_seq1");
    avg_flag = 1'b0;
    avgs_out = 11'(now);
    d_pulse();
    expect_state(ST_PRE_SEQ1, 1'b0, 1'b0, "pre_seq1 waits for averages");
    avg_flag = 1'b1;
    d_pulse();
    expect_state(result, result == ST_SEQ2, 1'b1, $sformatf("decision2 %0d vs %0d", now, stored));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    expect_state(ST_SEQ1, 1'b0, 1'b1, "reset");
    // stays when interval not exceeded (equal to limit: 490 + 10 = 500)
    trial_from_seq1(490, 500, ST_SEQ1);
    // lower by more than the interval: switch kept
    trial_from_seq1(489, 500, ST_SEQ2);
    // SEQ2 trials
    trial_from_seq2(700, 600, ST_SEQ2);
    trial_from_seq2(100, 300, ST_SEQ1);
    // no wrap: stored value below interval
    data_interval = 10'd20;
    trial_from_seq1(3, 5, ST_SEQ1);
    data_interval = 10'd0;
    trial_from_seq1(4, 5, ST_SEQ2);
    // manual from SEQ2
    manual = 1'b1;
    repeat (2) @(negedge clk);
    expect_state(ST_SEQ2, 1'b1, 1'b1, "manual waits for D");
    d_pulse();
    push_seq = 1'b1; blink = 1'b1; #1;
    expect_state(ST_MANUAL, 1'b1, 1'b1, "manual seq II");
    push_seq = 1'b0; blink = 1'b0; #1;
    expect_state(ST_MANUAL, 1'b0, 1'b0, "manual seq I");
    d_pulse();
    expect_state(ST_MANUAL, 1'b0, 1'b0, "manual held");
    manual = 1'b0;
    d_pulse();
    expect_state(ST_SEQ1, 1'b0, 1'b1, "manual exit");
    // manual from SEQ1
    manual = 1'b1;
    d_pulse();
    expect_state(ST_MANUAL, 1'b0, 1'b0, "manual from seq1");
    manual = 1'b0;
    // D without enable does nothing
    en = 1'b0;
    d_pulse();
    expect_state(ST_MANUAL, 1'b0, 1'b0, "no enable");
    en = 1'b1;
    d_pulse();
    expect_state(ST_SEQ1, 1'b0, 1'b1, "back to seq1");
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
