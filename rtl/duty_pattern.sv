// duty_pattern: simple actuator clock with adjustable period and duty cycle.
//
// A counter runs from 0 to pattern_period and wraps, so one period lasts
// pattern_period + 1 low-rate cycles; the output is high while the counter is
// below duty_cycle. With the 12.5 MHz low rate and the default setting of 250
// the period is about 20 us, and a duty cycle of 10 gives an 800 ns high
// pulse. This is the pattern the original design introduced as an easy
// alternative to the main one; the counter and comparison follow it. Here the
// output is registered (one cycle later than the original's decode) so the
// actuator clock pin is glitch-free.
//
// Interface: duty_cycle and pattern_period are 10-bit settings from the user
// panel; en is the low-rate enable.
module duty_pattern (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [9:0] duty_cycle,
  input  logic [9:0] pattern_period,
  output logic       out_pattern
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [9:0] counter;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      counter     <= '0;
      out_pattern <= 1'b0;
    end else if (en) begin
      counter     <= (counter < pattern_period) ? counter + 1'b1 : 10'd0;
      out_pattern <= (counter < duty_cycle);
    end
  end
endmodule
