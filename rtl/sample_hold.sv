// sample_hold: digital sample-and-hold for the ADC data.
//
// While hold is low the register takes a new ADC word every clock; while hold
// is high it keeps the last word, so samples taken while the capacitive
// divider is being reset never reach the filters. Behaviour as in the
// original design; the reset value of zero is this design's choice.
// Timing: one register, dout follows din one clock later. Clock: 100 MHz.
module sample_hold #(
  parameter int unsigned N = 11
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         hold,
  input  logic [N-1:0] din,
  output logic [N-1:0] dout
);
  timeunit 1ns;
  timeprecision 1ps;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)        dout <= '0;
    else if (!hold) dout <= din;
  end
endmodule
