// avg_counter: tells when the averager holds 2**AVGS samples of the new sequence.
//
// An AVGS+1 bit counter whose top bit is the flag. In sequence I (seq = 0) it
// counts up from zero; after 2**AVGS cycles the top bit sets and the counter
// is loaded with all ones and stays there. In sequence II (seq = 1) it counts
// down from all ones; after 2**AVGS cycles the top bit clears and the
// counter is cleared and stays there. So after every polarity change the flag
// toggles exactly 2**AVGS low-rate samples later: the pre-sequence-II state
// waits for flag = 0, the pre-sequence-I state for flag = 1. Manual mode
// (slide switch 3) keeps the counter cleared. This follows the original
// counter, which counts up in sequence I and down in sequence II.
//
// Timing: flag is the registered top bit; all activity on the low-rate enable.
module avg_counter #(
  parameter int unsigned AVGS = 5
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic manual,
  input  logic seq,
  output logic flag
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [AVGS:0] cnt;

  assign flag = cnt[AVGS];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) cnt <= '0;
    else if (en) begin
      if (manual)    cnt <= '0;
      else if (!seq) cnt <= flag ? '1 : cnt + 1'b1;
      else           cnt <= flag ? cnt - 1'b1 : '0;
    end
  end
endmodule
