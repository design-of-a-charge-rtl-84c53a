// mems_model: behavioural model (testbench only) of a charging MEMS actuator
// seen through the divider, the multiplexing board and the ADC.
//
// q is the trapped charge in ADC codes. While charging is enabled it grows by
// one code every CHARGE_NS in sequence I (seq = 0) and falls by one in
// sequence II, limited to +-QMAX. The trapped charge shifts the effective
// actuator voltage, so the measured code is BASE + q in sequence I and
// BASE - q in sequence II: the polarity that works the charge off measures
// lower. While the divider is reset the ADC shows a full-scale glitch,
// starting GLITCH_LAG clock cycles after H rises (ADC pipeline) and ending
// GLITCH_TAIL cycles after H falls. Codes change on the rising clock edge.
module mems_model #(
  parameter int BASE        = 500,
  parameter int QMAX        = 400,
  parameter int CHARGE_NS   = 4000,
  parameter int GLITCH_LAG  = 4,
  parameter int GLITCH_TAIL = 30
) (
  input  logic       clk,
  input  logic       h,
  input  logic       seq,
  input  logic       charging,
  input  logic       clear_charge,
  output logic [9:0] data_adc,
  output logic       glitch,
  output int         q
);
  timeunit 1ns;
  timeprecision 1ps;
  int h_high = 0, h_low = 1000;

  initial begin
    q = 0; glitch = 1'b0; data_adc = 10'(BASE);
  end

  always begin
    #(CHARGE_NS);
    if (clear_charge) q = 0;
    else if (charging) begin
      if (!seq && q < QMAX)      q = q + 1;
      else if (seq && q > -QMAX) q = q - 1;
    end
  end

  always @(posedge clk) begin
    h_high <= h ? h_high + 1 : 0;
    h_low  <= h ? 0 : h_low + 1;
    glitch <= (h && h_high >= GLITCH_LAG) || (!h && h_low < GLITCH_TAIL && h_low < 1000);
    if ((h && h_high >= GLITCH_LAG) || (!h && h_low < GLITCH_TAIL))
      data_adc <= 10'h3FF;
    else
      data_adc <= 10'(BASE + (seq ? -q : q) + int'($urandom % 2));
  end
endmodule
