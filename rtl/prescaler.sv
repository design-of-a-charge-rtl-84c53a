// prescaler: free-running binary counter with a rising-edge pulse per bit.
//
// The original design clocked several slow processes from bits of a
// general-purpose counter (button sampling, display scan, the parameter
// adjustment rates). Here every process stays on the system clock and uses a
// one-cycle pulse rise[k] in place of "rising edge of count bit k": rise[k] is
// high in the enabled cycle in which bit k goes from 0 to 1. The same module
// also divides the 100 MHz clock by 2**S to make the low-rate enable
// (rise[S-1] occurs once every 2**S enabled cycles).
//
// Interface: en advances the counter. Timing: count is registered; rise is
// combinational from count and en and is valid in the cycle before the edge
// at which bit k becomes 1.
module prescaler #(
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  output logic [W-1:0] count,
  output logic [W-1:0] rise
);
  timeunit 1ns;
  timeprecision 1ps;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     count <= '0;
    else if (en) count <= count + 1'b1;
  end

  // Bit k rises when all bits below it are one and bit k is zero.
  always_comb begin
    logic low_ones;
    low_ones = 1'b1;
    for (int k = 0; k < W; k++) begin
      rise[k]  = en && low_ones && !count[k];
      low_ones = low_ones && count[k];
    end
  end
endmodule
