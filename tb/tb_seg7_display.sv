// tb_seg7_display: scans a value through all four digits. For each digit the
// anode line must be the only low one (when enabled), and the lit segments
// must match the glyph of the hex digit, given here as letters of the lit
// segments (a..g), with the decimal point from dots.
module tb_seg7_display;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 1'b0, rst = 1'b1;
  logic scan = 1'b0;
  logic [15:0] value;
  logic [3:0] dots, en;
  logic [7:0] bcd_out;
  logic [3:0] bcd_sel;
  int checks = 0, failures = 0;
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abcf",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  always #5 clk = ~clk;

  seg7_display dut (.clk, .rst, .scan, .value, .dots, .en, .bcd_out, .bcd_sel);

  function automatic logic [6:0] glyph(input int d);
    logic [6:0] g = 7'h7F;  // active low, bit 0 = a
    string s = lit[d];
    for (int i = 0; i < s.len(); i++) g[s[i] - "a"] = 1'b0;
    return g;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 40; t++) begin
      value = 16'($urandom);
      dots  = 4'($urandom);
      en    = (t < 20) ? 4'hF : 4'($urandom);
      for (int d = 0; d < 4; d++) begin
        // pointer is at digit d here
        #1;
        checks += 2;
        if (bcd_out !== {~dots[d], glyph(int'(value[4*d +: 4]))}) begin
          failures++;
          $display("FAIL digit %0d value %h seg %b", d, value, bcd_out);
        end
        if (bcd_sel !== (en[d] ? ~(4'b1 << d) : 4'hF)) begin
          failures++;
          $display("FAIL digit %0d anodes %b", d, bcd_sel);
        end
        @(negedge clk);
        scan = 1'b1;
        @(negedge clk);
        scan = 1'b0;
        repeat ($urandom % 3) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
