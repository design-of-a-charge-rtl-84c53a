// subsampler: block-average decimator from the 100 MHz rate to the low rate.
//
// The low-rate clock of the controller is the 100 MHz clock divided by 2**S
// (12.5 MHz for S = 3). Each low-rate sample is the mean of the 2**S fast
// samples of one low-rate period: the block sums the fast samples and, in the
// last fast cycle of the period (win_end high), registers the sum shifted
// right by S and starts a new sum. This is the function of the original
// subsampler, which kept the 2**S samples in a small array and summed the
// copy in the low-rate domain; a running sum gives the same means with one
// adder. Unsigned data (the ADC code is zero-extended) is this design's
// reading of the original sign extension, which is the same for these values.
//
// Interface: win_end must pulse once every 2**S cycles. Timing: dout changes
// at the clock edge that ends the window and holds for the next window.
module subsampler #(
  parameter int unsigned N = 11,
  parameter int unsigned S = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         win_end,
  input  logic [N-1:0] din,
  output logic [N-1:0] dout
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [N+S-1:0] acc;
  logic [N+S-1:0] total;

  assign total = acc + (N+S)'(din);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      acc  <= '0;
      dout <= '0;
    end else if (win_end) begin
      acc  <= '0;
      dout <= total[N+S-1:S];
    end else begin
      acc  <= total;
    end
  end
endmodule
