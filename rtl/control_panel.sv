// control_panel: switches, push buttons, run-time settings and display select.
//
// The switches and buttons are sampled on the sample pulse (about every
// 1.3 ms, which also removes contact bounce). Slide switches 2..0 choose what
// the 7-segment display shows; in the modes that show a setting, push button
// 0 increases and push button 1 decreases it, one step per adjustment pulse
// while the button is held:
//
//   sw[2:0]  display                                  step        rate pulse
//   000      capSeqII[7:0], capSeqI[7:0] (hex)        -           -
//   001      sec_time, sequence period (~0.67 s unit) 1           adj_sec
//   010      data_interval, decision hysteresis       1           adj_interval
//   011      halfperiod of the main pattern           accelerating adj_sec
//   100      duty_cycle of the simple pattern         10          adj_pattern
//   101      pattern_period of the simple pattern     125         adj_pattern
//   others   E00E                                     -           -
//
// For halfperiod the step grows by one every adjustment pulse while either
// button is held (up to 2046) and returns to 1 when both are released.
// The captured values shown in mode 000 are refreshed on the adj_sec pulse
// so they can be read.
//
// Modes, steps, rates, defaults (sec_time 1, data_interval 10, halfperiod 27,
// duty_cycle 10, pattern_period 250) and ranges follow the original design.
// This design's choices: sec_time wraps in 4 bits as the original register
// does, the other settings stop at the ends of their ranges instead of
// leaving them, and reset returns every setting to its default.
module control_panel (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,            // low-rate enable (display register)
  input  logic        sample,        // switch/button sampling pulse
  input  logic        adj_sec,       // sec_time and halfperiod rate
  input  logic        adj_pattern,   // duty_cycle and pattern_period rate
  input  logic        adj_interval,  // data_interval rate
  input  logic [7:0]  slide_switch,
  input  logic [2:0]  push_switch,
  input  logic [10:0] cap_seq1,
  input  logic [10:0] cap_seq2,
  output logic [7:0]  slide_filt,
  output logic [2:0]  push_filt,
  output logic [3:0]  sec_time,
  output logic [9:0]  data_interval,
  output logic [12:0] halfperiod,
  output logic [9:0]  duty_cycle,
  output logic [9:0]  pattern_period,
  output logic [15:0] disp_value,
  output logic [3:0]  disp_dots
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam logic [3:0]  SEC_TIME_INIT = 4'd1;
  localparam logic [9:0]  INTERVAL_INIT = 10'd10;
  localparam logic [9:0]  INTERVAL_MAX  = 10'd512;
  localparam logic [12:0] HALFPER_INIT  = 13'd27;  // 216 / 2**3
  localparam logic [10:0] HP_STEP_MAX   = 11'd2046;
  localparam logic [9:0]  DUTY_INIT     = 10'd10;
  localparam logic [9:0]  PERIOD_INIT   = 10'd250;

  logic [2:0]  mode;
  logic        up, down;
  logic [10:0] hp_step;
  logic [15:0] caps_shown;

  assign mode = slide_filt[2:0];
  assign up   = push_filt[0];
  assign down = !push_filt[0] && push_filt[1];

  // Sampling of switches and buttons.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      slide_filt <= '0;
      push_filt  <= '0;
    end else if (sample) begin
      slide_filt <= slide_switch;
      push_filt  <= push_switch;
    end
  end

  // Settings on the adj_sec pulse: sec_time, halfperiod and its step,
  // display copy of the captured values.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sec_time   <= SEC_TIME_INIT;
      halfperiod <= HALFPER_INIT;
      hp_step    <= 11'd1;
      caps_shown <= '0;
    end else if (adj_sec) begin
      caps_shown <= {cap_seq2[7:0], cap_seq1[7:0]};
      if (mode == 3'b001) begin
        if (up)        sec_time <= sec_time + 1'b1;
        else if (down) sec_time <= sec_time - 1'b1;
      end
      if (!push_filt[0] && !push_filt[1]) hp_step <= 11'd1;
      else if (hp_step != HP_STEP_MAX)    hp_step <= hp_step + 1'b1;
      if (mode == 3'b011) begin
        if (up)
          halfperiod <= (14'(halfperiod) + 14'(hp_step) > 14'd8191) ? 13'd8191
                                                                   : halfperiod + 13'(hp_step);
        else if (down)
          halfperiod <= (halfperiod > 13'(hp_step)) ? halfperiod - 13'(hp_step) : 13'd1;
      end
    end
  end

  // Hysteresis width on the adj_interval pulse.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) data_interval <= INTERVAL_INIT;
    else if (adj_interval && mode == 3'b010) begin
      if (up && data_interval != INTERVAL_MAX) data_interval <= data_interval + 1'b1;
      else if (down && data_interval != '0)    data_interval <= data_interval - 1'b1;
    end
  end

  // Simple-pattern duty cycle and period on the adj_pattern pulse.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      duty_cycle     <= DUTY_INIT;
      pattern_period <= PERIOD_INIT;
    end else if (adj_pattern) begin
      if (mode == 3'b100) begin
        if (up)        duty_cycle <= (duty_cycle > 10'd1013) ? 10'd1023 : duty_cycle + 10'd10;
        else if (down) duty_cycle <= (duty_cycle > 10'd10) ? duty_cycle - 10'd10 : 10'd1;
      end else if (mode == 3'b101) begin
        if (up)        pattern_period <= (pattern_period > 10'd898) ? 10'd1023 : pattern_period + 10'd125;
        else if (down) pattern_period <= (pattern_period > 10'd125) ? pattern_period - 10'd125 : 10'd1;
      end
    end
  end

  // Display source select.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      disp_value <= '0;
      disp_dots  <= '0;
    end else if (en) begin
      disp_dots <= 4'b0000;
      unique case (mode)
        3'b000:  disp_value <= caps_shown;
        3'b001:  disp_value <= 16'(sec_time);
        3'b010:  disp_value <= 16'(data_interval);
        3'b011:  disp_value <= 16'(halfperiod);
        3'b100:  disp_value <= 16'(duty_cycle);
        3'b101:  disp_value <= 16'(pattern_period);
        default: disp_value <= 16'hE00E;
      endcase
    end
  end
endmodule
