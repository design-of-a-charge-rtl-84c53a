// mems_pkg: types and widths shared by the charge-injection compensation controller.
//
// The controller alternates the polarity of the supply of a capacitive divider
// (MEMS actuator in series with a fixed capacitor) between sequence I and
// sequence II and keeps the polarity that gives the lower measured capacitance.
// This package holds the sequence state type and the widths of the measured
// data path. The five states and the binary (three flip-flop) state encoding
// follow the original design; the numeric codes are this design's choice.
package mems_pkg;
  timeunit 1ns;
  timeprecision 1ps;


  // Width of the measurement path: the 10-bit ADC code zero-extended by one bit.
  localparam int unsigned DW = 11;

  // Sequence control states. Binary encoding, three flip-flops.
  typedef enum logic [2:0] {
    ST_SEQ1     = 3'd0,  // sequence I: LO_MEMS grounded, HI_MEMS 0 V / +15 V
    ST_PRE_SEQ2 = 3'd1,  // sequence II applied, averaging to decide
    ST_SEQ2     = 3'd2,  // sequence II: LO_MEMS 0 V / 3.3 V, HI_MEMS -11.7 V / 0 V
    ST_PRE_SEQ1 = 3'd3,  // sequence I applied, averaging to decide
    ST_MANUAL   = 3'd4   // polarity follows push button 2
  } seq_state_t;

  // Actuator-clock source chosen by slide switches 7..6.
  typedef enum logic [1:0] {
    PAT_MAIN = 2'b00,  // comparator-locked main pattern
    PAT_LOW  = 2'b01,  // test: low duty cycle (high voltage applied only)
    PAT_HIGH = 2'b10,  // test: high duty cycle (low voltage applied only)
    PAT_MY   = 2'b11   // simple period / duty-cycle pattern
  } pat_sel_t;

endpackage
