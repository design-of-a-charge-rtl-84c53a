// mems_charge_ctrl: charge-injection compensation controller for a MEMS
// electrostatic actuator (top level).
//
// The actuator sits in a capacitive divider with a fixed capacitor. A
// front-end chip pulses the divider with the actuator clock (clk_dacea) and,
// once per pulse, discharges it under its H (hold), R and D (discharge)
// signals; between discharges the divider output, digitised by a 10-bit ADC,
// measures the actuator capacitance. Charge trapped in the dielectric raises
// that capacitance. This controller measures it in both supply polarities
// (sequence I: HI_MEMS 0/+15 V, LO_MEMS ground; sequence II: HI_MEMS
// -11.7/0 V, LO_MEMS 0/3.3 V, selected by digs[4] on external multiplexers)
// and keeps the polarity that measures lower, so the trapped charge is
// worked off instead of growing.
//
// Data path (100 MHz): ADC code -> sample_hold (frozen while the stretched
// hold from hold_stretch is high) -> subsampler (mean of 2**SSFACTOR samples,
// one per low-rate cycle of 100/2**SSFACTOR MHz) -> moving_average (mean of
// the last 2**AVGS low-rate samples) -> cap_store and charge_fsm. The
// sequence timer seq_timer sets how long each sequence lasts before a trial
// switch, avg_counter says when the averager holds only samples of the new
// polarity. The actuator clock comes from one of four generators chosen by
// slide switches 7..6 (main comparator-locked pattern, low or high duty test
// patterns, simple period/duty pattern). control_panel, seg7_display and the
// LEDs form the user interface; slide switches 5..4 choose the ADC clock
// (100 MHz, 12.5 MHz or 50 MHz).
//
// Clocking is this design's choice: the original ran the slow logic on a
// second clock from the FPGA's clock manager and on bits of a divider; here
// everything runs on the 100 MHz clock with one-cycle enables (low-rate
// enable every 2**SSFACTOR cycles, divider-bit pulses from prescaler). The
// ADC clock output is the one place where a clock is multiplexed as data.
// h_dacea and d_dacea are used without synchronisers, as in the original;
// they are generated by the chip from clk_dacea, which this design drives.
//
// Interface summary: leds[0] = digs[4] (sequence), leds[1] = state LED,
// leds[5:2] and leds[6] = sequence-timer progress, leds[7] = averaging flag.
// digs[3:1], man, h0 and d0_c are held low (chip mode pins). capture shows
// sampled push button 0, cmpout repeats comp.
module mems_charge_ctrl
  import mems_pkg::*;
#(
  parameter int unsigned SSFACTOR     = 3,
  parameter int unsigned AVGS         = 5,
  parameter int unsigned SEC_LSB      = 23,
  parameter int unsigned PREHOLD_TIME = 2,
  parameter int unsigned HPOS_TIME    = 70,
  parameter int unsigned MAXLOCK      = 15000,
  parameter int unsigned GRACE        = 200 / (2 ** SSFACTOR)
) (
  input  logic       clk,           // 100 MHz
  input  logic       rst,           // asynchronous, active high
  input  logic [9:0] data_adc,
  input  logic       h_dacea,
  input  logic       d_dacea,
  input  logic       comp,
  input  logic [7:0] slide_switch,
  input  logic [2:0] push_switch,
  output logic       clk_adc,
  output logic       clk_dacea,
  output logic [7:0] bcd_out,
  output logic [3:0] bcd_sel,
  output logic [7:0] leds,
  output logic [4:1] digs,
  output logic       cmpout,
  output logic       capture,
  output logic       man,
  output logic       h0,
  output logic       d0_c
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned DIV_W = 24;

  // ---------------- clock enables ----------------
  logic [SSFACTOR-1:0] fast_cnt, fast_rise;
  logic                lf_en;
  logic [DIV_W-1:0]    clk_div, div_rise;

  prescaler #(.W(SSFACTOR)) u_fast_div (
    .clk, .rst, .en(1'b1), .count(fast_cnt), .rise(fast_rise)
  );
  assign lf_en = fast_rise[SSFACTOR-1];

  prescaler #(.W(DIV_W)) u_gp_div (
    .clk, .rst, .en(lf_en), .count(clk_div), .rise(div_rise)
  );

  // ---------------- user interface ----------------
  logic [7:0]  slide_filt;
  logic [2:0]  push_filt;
  logic [3:0]  sec_time;
  logic [9:0]  data_interval, duty_cycle, pattern_period;
  logic [12:0] halfperiod;
  logic [15:0] disp_value;
  logic [3:0]  disp_dots;
  logic [DW-1:0] cap_seq1, cap_seq2;

  control_panel u_panel (
    .clk, .rst, .en(lf_en),
    .sample      (div_rise[14]),
    .adj_sec     (div_rise[22-SSFACTOR]),
    .adj_pattern (div_rise[20]),
    .adj_interval(div_rise[21]),
    .slide_switch, .push_switch,
    .cap_seq1, .cap_seq2,
    .slide_filt, .push_filt, .sec_time, .data_interval, .halfperiod,
    .duty_cycle, .pattern_period, .disp_value, .disp_dots
  );

  seg7_display u_disp (
    .clk, .rst, .scan(div_rise[10]), .value(disp_value), .dots(disp_dots),
    .en(4'b1111), .bcd_out, .bcd_sel
  );

  // ---------------- measurement path ----------------
  logic          h_pos;
  logic [DW-1:0] sah_out, subs_out, avgs_out;

  hold_stretch #(.PRE_DELAY(PREHOLD_TIME), .POST_DELAY(HPOS_TIME), .PREVENTIVE(1'b1)) u_hold (
    .clk, .rst, .inp(h_dacea), .outp(h_pos)
  );

  sample_hold #(.N(DW)) u_sah (
    .clk, .rst, .hold(h_pos), .din({1'b0, data_adc}), .dout(sah_out)
  );

  subsampler #(.N(DW), .S(SSFACTOR)) u_subs (
    .clk, .rst, .win_end(lf_en), .din(sah_out), .dout(subs_out)
  );

  moving_average #(.N(DW), .AVGS(AVGS)) u_avg (
    .clk, .rst, .en(lf_en), .din(subs_out), .dout(avgs_out)
  );

  // ---------------- sequence control ----------------
  logic               manual, expired, avg_flag, seq, state_led;
  logic [SEC_LSB+3:0] sec_count;
  seq_state_t         state;

  assign manual = slide_filt[3];

  seq_timer #(.SEC_LSB(SEC_LSB)) u_timer (
    .clk, .rst, .en(lf_en), .manual, .d_dacea, .sec_time, .expired, .count(sec_count)
  );

  avg_counter #(.AVGS(AVGS)) u_avgcnt (
    .clk, .rst, .en(lf_en), .manual, .seq, .flag(avg_flag)
  );

  charge_fsm u_fsm (
    .clk, .rst, .en(lf_en), .d_dacea, .manual,
    .push_seq(push_filt[2]), .blink(clk_div[20]),
    .expired, .avg_flag, .avgs_out, .cap_seq1, .cap_seq2, .data_interval,
    .state, .seq, .led(state_led)
  );

  cap_store u_caps (
    .clk, .rst, .en(lf_en), .state, .seq, .avgs_out, .cap_seq1, .cap_seq2
  );

  // ---------------- actuator clock generators ----------------
  logic pat_main, pat_lock, pat_low, pat_high, pat_my;

  out_pattern #(.MAXLOCK(MAXLOCK), .GRACE(GRACE)) u_main_pat (
    .clk, .rst, .en(lf_en), .comp, .halfperiod, .lock(pat_lock), .pat_out(pat_main)
  );

  duty_pattern u_my_pat (
    .clk, .rst, .en(lf_en), .duty_cycle, .pattern_period, .out_pattern(pat_my)
  );

  // Low duty: 3 ones in 1024 bits. High duty: 24 zeros in 256 bits.
  cyclic_pattern #(.N(1024)) u_low_pat (
    .clk, .rst, .en(lf_en), .pattern(1024'h7), .b(pat_low)
  );
  cyclic_pattern #(.N(256)) u_high_pat (
    .clk, .rst, .en(lf_en), .pattern(~256'hFF_FFFF), .b(pat_high)
  );

  always_comb begin
    unique case (pat_sel_t'(slide_filt[7:6]))
      PAT_MAIN: clk_dacea = pat_main;
      PAT_LOW:  clk_dacea = pat_low;
      PAT_HIGH: clk_dacea = pat_high;
      default:  clk_dacea = pat_my;
    endcase
  end

  // ADC clock: 01 -> low rate, 10 -> 50 MHz, otherwise 100 MHz.
  always_comb begin
    unique case (slide_filt[5:4])
      2'b01:   clk_adc = fast_cnt[SSFACTOR-1];
      2'b10:   clk_adc = fast_cnt[0];
      default: clk_adc = clk;
    endcase
  end

  // ---------------- outputs ----------------
  assign digs    = {seq, 3'b000};
  assign leds    = {avg_flag, sec_count[SEC_LSB+2], sec_count[SEC_LSB+1 -: 4], state_led, seq};
  assign cmpout  = comp;
  assign capture = push_filt[0];
  assign man     = 1'b0;
  assign h0      = 1'b0;
  assign d0_c    = 1'b0;
endmodule
