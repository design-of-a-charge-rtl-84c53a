// moving_average: sliding-window mean over the last 2**AVGS low-rate samples.
//
// This is the low-pass filter of the measurement path: an N-point averager,
// the same as an FIR filter with all coefficients equal to 1/N. The samples
// sit in a shift register of 2**AVGS words (newest enters, oldest leaves);
// division by the window length is a right shift by AVGS.
//
// The original design added up the whole window every clock. Here a running
// sum is kept instead (add the new sample, subtract the one that drops out),
// which gives the same output with two adders instead of 2**AVGS. The window
// starts filled with zeros after reset, so the first 2**AVGS outputs are not
// yet full means; the controller waits for 2**AVGS new samples (avg_counter)
// before it uses the result.
//
// Timing: with en high, din enters at a clock edge and is contained in dout
// from the next enabled edge on (the output register lags the sum by one
// enabled cycle, as in the original). Clock: 100 MHz with the low-rate enable.
module moving_average #(
  parameter int unsigned N    = 11,
  parameter int unsigned AVGS = 5
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [N-1:0] din,
  output logic [N-1:0] dout
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned LEN = 2 ** AVGS;

  logic [N-1:0]      window [LEN];  // window[0] is the oldest sample
  logic [N+AVGS-1:0] sum;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < LEN; i++) window[i] <= '0;
      sum  <= '0;
      dout <= '0;
    end else if (en) begin
      for (int i = 0; i < LEN - 1; i++) window[i] <= window[i+1];
      window[LEN-1] <= din;
      sum  <= sum + (N+AVGS)'(din) - (N+AVGS)'(window[0]);
      dout <= sum[N+AVGS-1:AVGS];
    end
  end
endmodule
