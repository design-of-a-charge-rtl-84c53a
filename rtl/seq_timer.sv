// seq_timer: sequence period timer (the original secCount).
//
// A free-running counter on the low-rate enable. When its four top bits
// equal sec_time it stops and reports expired; it is cleared in the first
// enabled cycle in which the chip's discharge signal D is high, which is also
// the moment the sequence state machine takes its next state. Manual mode
// (slide switch 3) keeps it cleared. With the 12.5 MHz low rate and
// SEC_LSB = 23 one unit of sec_time is 2**23 cycles, about 0.67 s (the
// original calls it "approximately 1 s"). SEC_LSB is a parameter so the same
// logic can be simulated with a short period; the original used bit 12 for
// that purpose.
//
// Interface: count is brought out for the LED bar graph. Timing: expired is
// combinational from the counter register.
module seq_timer #(
  parameter int unsigned SEC_LSB = 23
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic               manual,
  input  logic               d_dacea,
  input  logic [3:0]         sec_time,
  output logic               expired,
  output logic [SEC_LSB+3:0] count
);
  timeunit 1ns;
  timeprecision 1ps;

  assign expired = (count[SEC_LSB+3:SEC_LSB] == sec_time);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) count <= '0;
    else if (en) begin
      if (manual)       count <= '0;
      else if (expired) begin
        if (d_dacea)    count <= '0;
      end else          count <= count + 1'b1;
    end
  end
endmodule
