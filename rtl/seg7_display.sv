// seg7_display: four-digit multiplexed 7-segment display driver.
//
// A 2-bit digit pointer advances on every scan pulse; the pointed nibble of
// value (digit 0 = value[3:0]) and its decimal point go through the
// hexadecimal decoder to bcd_out, and the matching anode line of bcd_sel is
// pulled low if that digit is enabled (all lines high otherwise). Scanning
// fast enough makes all four digits appear lit. The structure (counter,
// 4:1 digit multiplexer, 2:4 anode decoder, segment decoder) and the
// active-low polarities follow the original driver; the scan pulse replaces
// its slow scan clock (one bit of the general-purpose divider).
//
// Timing: the pointer is registered, the outputs are combinational from it.
module seg7_display (
  input  logic        clk,
  input  logic        rst,
  input  logic        scan,
  input  logic [15:0] value,
  input  logic [3:0]  dots,
  input  logic [3:0]  en,
  output logic [7:0]  bcd_out,
  output logic [3:0]  bcd_sel
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [1:0] sel;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       sel <= '0;
    else if (scan) sel <= sel + 1'b1;
  end

  seg7_decoder u_dec (
    .digit (value[4*sel +: 4]),
    .dot   (dots[sel]),
    .seg   (bcd_out)
  );

  always_comb begin
    bcd_sel = 4'b1111;
    if (en[sel]) bcd_sel[sel] = 1'b0;
  end
endmodule
