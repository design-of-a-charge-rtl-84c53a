// tb_subsampler: 2**S = 8 fast samples per window; after each window end the
// output must be the integer mean of that window's 8 inputs.
module tb_subsampler;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int S = 3;
  logic clk = 1'b0, rst = 1'b1;
  logic win_end;
  logic [10:0] din = '0, dout;
  logic [2:0] phase = '0;
  int checks = 0, failures = 0;
  int sum, expected;

  always #5 clk = ~clk;
  assign win_end = (phase == 3'd7);

  subsampler #(.N(11), .S(S)) dut (.clk, .rst, .win_end, .din, .dout);

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    sum = 0;
    for (int i = 0; i < 8 * 300; i++) begin
      din = (i < 8 * 10) ? 11'h7FF : 11'($urandom);
      @(posedge clk);
      sum += din;
      if (phase == 3'd7) begin
        expected = sum / 8;
        sum = 0;
        @(negedge clk);
        checks++;
        if (dout !== 11'(expected)) begin
          failures++;
          $display("FAIL window %0d got %0d expected %0d", i / 8, dout, expected);
        end
      end else @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk) if (!rst) phase <= phase + 1'b1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
