// charge_fsm: decides which supply polarity (sequence) the divider gets.
//
// Charge injected into the actuator dielectric shows up as a growing measured
// capacitance; reversing the supply polarity first removes the injected
// charge and then starts charging the other way. The machine therefore runs
// sequence I, and when the sequence timer expires it switches to sequence II
// (state PRE_SEQ2), waits until the averager holds 2**AVGS samples of the new
// sequence, and compares: if the new mean is lower than the last mean of the
// old sequence by more than data_interval it stays in sequence II (SEQ2),
// otherwise it goes back to SEQ1. The same happens from SEQ2 through
// PRE_SEQ1. With data_interval = 0 and no charging the polarity alternates
// every period; with data_interval > 0 the machine stays in one sequence and
// makes short trial switches until the other sequence measures clearly lower.
// Slide switch 3 (manual) leads from SEQ1 or SEQ2 to MANUAL, where push
// button 2 sets the polarity; releasing the switch returns to SEQ1.
//
// The state register loads the next state only in enabled cycles with the
// chip's D signal high, so a polarity change always happens while the
// divider is being discharged (H high) and the sensing path is frozen.
//
// Outputs are Moore decodes of the state: seq (multiplexer select, 0 =
// sequence I) and led (on in SEQ1/SEQ2, off in the pre-states, blinking in
// MANUAL). States, transitions, outputs and the D gating follow the original
// design. The comparison is this design's reading: the original subtracts
// data_interval from the stored 11-bit value, which would wrap for stored
// values below data_interval; here avgs_out + data_interval < stored is
// evaluated without wrapping.
module charge_fsm
  import mems_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          d_dacea,
  input  logic          manual,      // slide switch 3
  input  logic          push_seq,    // push button 2, polarity in MANUAL
  input  logic          blink,       // slow square wave for the MANUAL LED
  input  logic          expired,     // sequence timer reached sec_time
  input  logic          avg_flag,    // averaging counter top bit
  input  logic [DW-1:0] avgs_out,
  input  logic [DW-1:0] cap_seq1,
  input  logic [DW-1:0] cap_seq2,
  input  logic [9:0]    data_interval,
  output seq_state_t    state,
  output logic          seq,
  output logic          led
);
  timeunit 1ns;
  timeprecision 1ps;

  seq_state_t state_next;
  logic       lower_than_seq1, lower_than_seq2;

  assign lower_than_seq1 = (12'(avgs_out) + 12'(data_interval)) < 12'(cap_seq1);
  assign lower_than_seq2 = (12'(avgs_out) + 12'(data_interval)) < 12'(cap_seq2);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                 state <= ST_SEQ1;
    else if (en && d_dacea)  state <= state_next;
  end

  always_comb begin
    state_next = state;
    seq        = 1'b0;
    led        = 1'b0;
    unique case (state)
      ST_SEQ1: begin
        seq = 1'b0; led = 1'b1;
        if (manual)       state_next = ST_MANUAL;
        else if (expired) state_next = ST_PRE_SEQ2;
      end
      ST_PRE_SEQ2: begin
        seq = 1'b1; led = 1'b0;
        if (!avg_flag) state_next = lower_than_seq1 ? ST_SEQ2 : ST_SEQ1;
      end
      ST_SEQ2: begin
        seq = 1'b1; led = 1'b1;
        if (manual)       state_next = ST_MANUAL;
        else if (expired) state_next = ST_PRE_SEQ1;
      end
      ST_PRE_SEQ1: begin
        seq = 1'b0; led = 1'b0;
        if (avg_flag) state_next = lower_than_seq2 ? ST_SEQ1 : ST_SEQ2;
      end
      ST_MANUAL: begin
        seq = push_seq; led = blink;
        if (!manual) state_next = ST_SEQ1;
      end
      default: state_next = ST_SEQ1;
    endcase
  end
endmodule
