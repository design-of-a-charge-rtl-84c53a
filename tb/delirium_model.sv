// delirium_model: behavioural model (testbench only) of the capacitance
// front-end chip's control sequence.
//
// On every rising edge of the actuator clock the chip starts a reset of the
// capacitive divider: H rises (output frozen), then R (series capacitor
// discharged), then D (actuator discharged). On the falling edge R returns
// to 0 first, then D (divider charged again) and finally H (output tracks
// again). The order follows the chip's documented sequence; the 10 ns steps
// are this model's choice. Not synthesizable.
module delirium_model (
  input  logic clk_dacea,
  output logic h,
  output logic r,
  output logic d
);
  timeunit 1ns;
  timeprecision 1ps;
  initial begin
    h = 1'b0; r = 1'b0; d = 1'b0;
  end

  always @(posedge clk_dacea) begin
    #10 h = 1'b1;
    #10 r = 1'b1;
    #10 d = 1'b1;
  end

  always @(negedge clk_dacea) begin
    #10 r = 1'b0;
    #20 d = 1'b0;
    #30 h = 1'b0;
  end
endmodule
