// cap_store: keeps the latest mean measured in each sequence.
//
// Two enabled registers. capSeqI takes the averager output every low-rate
// cycle while the machine is in SEQ1, or in MANUAL with sequence I selected;
// capSeqII likewise in SEQ2, or in MANUAL with sequence II. In the
// pre-states neither is written, so after a polarity change the value of the
// old sequence is still there for the comparison. Enables as in the original
// capacitance storage (two D flip-flop banks with AND/OR enable logic).
//
// Timing: registers, written on the low-rate enable.
module cap_store
  import mems_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  seq_state_t    state,
  input  logic          seq,
  input  logic [DW-1:0] avgs_out,
  output logic [DW-1:0] cap_seq1,
  output logic [DW-1:0] cap_seq2
);
  timeunit 1ns;
  timeprecision 1ps;

  logic take1, take2;

  assign take1 = (state == ST_SEQ1) || (state == ST_MANUAL && !seq);
  assign take2 = (state == ST_SEQ2) || (state == ST_MANUAL &&  seq);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cap_seq1 <= '0;
      cap_seq2 <= '0;
    end else if (en) begin
      if (take1)      cap_seq1 <= avgs_out;
      else if (take2) cap_seq2 <= avgs_out;
    end
  end
endmodule
