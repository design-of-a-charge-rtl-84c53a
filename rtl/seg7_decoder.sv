// seg7_decoder: hexadecimal digit to 7-segment pattern, active-low outputs.
//
// seg[6:0] are segments g..a (bit 0 = a), low = lit; seg[7] is the decimal
// point, also active low. All sixteen hex digits are shown (A, b, C, d, E, F
// above 9). The segment codes are the ones of the original display driver;
// its 7 lights segment f as well as a, b and c. Purely combinational.
module seg7_decoder (
  input  logic [3:0] digit,
  input  logic       dot,
  output logic [7:0] seg
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [6:0] gfedcba;

  always_comb begin
    unique case (digit)
      4'h0: gfedcba = 7'b1000000;
      4'h1: gfedcba = 7'b1111001;
      4'h2: gfedcba = 7'b0100100;
      4'h3: gfedcba = 7'b0110000;
      4'h4: gfedcba = 7'b0011001;
      4'h5: gfedcba = 7'b0010010;
      4'h6: gfedcba = 7'b0000010;
      4'h7: gfedcba = 7'b1011000;
      4'h8: gfedcba = 7'b0000000;
      4'h9: gfedcba = 7'b0010000;
      4'hA: gfedcba = 7'b0001000;
      4'hB: gfedcba = 7'b0000011;
      4'hC: gfedcba = 7'b1000110;
      4'hD: gfedcba = 7'b0100001;
      4'hE: gfedcba = 7'b0000110;
      default: gfedcba = 7'b0001110;  // F
    endcase
    seg = {~dot, gfedcba};
  end
endmodule
