// cyclic_pattern: plays a fixed N-bit pattern bit by bit, over and over.
//
// An index walks down from N-1 to 0 and wraps; each enabled cycle the output
// register takes the pattern bit at the new index. Reset puts the index at
// N-1. The controller uses two of these as test-mode actuator clocks: a
// 1024-bit pattern with 3 ones (very low duty cycle, the actuator sees the
// high voltage almost all the time) and a 256-bit pattern with 24 zeros (very
// high duty cycle). Behaviour as in the original sequence generator.
//
// Interface: pattern is a constant input, en the low-rate enable.
// Timing: b changes one clock after the index does.
module cyclic_pattern #(
  parameter int unsigned N = 1024
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [N-1:0] pattern,
  output logic         b
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  localparam logic [IW-1:0] LAST = IW'(N - 1);

  logic [IW-1:0] idx;
  logic [IW-1:0] idx_next;

  assign idx_next = (idx == '0) ? LAST : idx - 1'b1;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      idx <= LAST;
      b   <= pattern[N-1];
    end else if (en) begin
      idx <= idx_next;
      b   <= pattern[idx_next];
    end
  end
endmodule
