// tb_moving_average: random samples with an irregular enable. After each
// enabled edge the output must be the mean (floor) of the 32 samples that
// entered before that edge (zeros before the first 32).
module tb_moving_average;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int AVGS = 5, LEN = 32;
  logic clk = 1'b0, rst = 1'b1;
  logic en = 1'b0;
  logic [10:0] din = '0, dout;
  int checks = 0, failures = 0;
  int hist[$];
  int expected, s;

  always #5 clk = ~clk;

  moving_average #(.N(11), .AVGS(AVGS)) dut (.clk, .rst, .en, .din, .dout);

  initial begin
    expected = 0;
    for (int i = 0; i < LEN; i++) hist.push_back(0);
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      en  = ($urandom % 4) != 0;
      din = (i < 200) ? 11'h7FF : 11'($urandom);
      @(posedge clk);
      if (en) begin
        s = 0;
        foreach (hist[k]) s += hist[k];
        expected = s / LEN;
        hist.push_back(int'(din));
        void'(hist.pop_front());
      end
      @(negedge clk);
      checks++;
      if (dout !== 11'(expected)) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d got %0d expected %0d", i, dout, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
