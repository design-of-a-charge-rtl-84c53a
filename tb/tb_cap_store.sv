// tb_cap_store: random states, polarity and enable; each stored value must
// follow the averager only in its own sequence state (or MANUAL with its
// polarity) and keep its value otherwise.
module tb_cap_store;
  timeunit 1ns;
  timeprecision 1ps;
  import mems_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic en = 1'b0, seq = 1'b0;
  seq_state_t state = ST_SEQ1;
  logic [10:0] avgs_out = '0, cap_seq1, cap_seq2, e1, e2;
  int checks = 0, failures = 0, w1 = 0, w2 = 0;

  always #5 clk = ~clk;

  cap_store dut (.*);

  initial begin
    e1 = '0; e2 = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      en       = $urandom % 2;
      seq      = $urandom % 2;
      state    = seq_state_t'($urandom % 5);
      avgs_out = 11'($urandom);
      @(posedge clk);
      if (en) begin
        if (state == ST_SEQ1 || (state == ST_MANUAL && !seq)) begin e1 = avgs_out; w1++; end
        if (state == ST_SEQ2 || (state == ST_MANUAL &&  seq)) begin e2 = avgs_out; w2++; end
      end
      @(negedge clk);
      checks++;
      if (cap_seq1 !== e1 || cap_seq2 !== e2) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d %0d/%0d expected %0d/%0d", i, cap_seq1, cap_seq2, e1, e2);
      end
    end
    $display("writes %0d %0d", w1, w2);
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
