// tb_hold_stretch: directed timing checks of the hold stretcher.
//
// Three instances: the controller's setting (pre 2, post 70, preventive),
// and pre 5 / post 9 with and without the preventive option. Inputs change
// on the falling clock edge; j counts rising edges since the change. A rise
// seen at edge 1 must reach the output after edge PRE, a fall after edge
// POST. A pulse shorter than the pre-delay must give a POST-long hold when
// preventive and a full hold (rise after PRE, fall POST after the pulse end)
// otherwise.
module tb_hold_stretch;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 1'b0, rst = 1'b1;
  logic inp = 1'b0;
  logic o_def, o_p, o_np;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hold_stretch dut_def (.clk, .rst, .inp, .outp(o_def));
  hold_stretch #(.PRE_DELAY(5), .POST_DELAY(9), .PREVENTIVE(1'b1)) dut_p  (.clk, .rst, .inp, .outp(o_p));
  hold_stretch #(.PRE_DELAY(5), .POST_DELAY(9), .PREVENTIVE(1'b0)) dut_np (.clk, .rst, .inp, .outp(o_np));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    check(o_def, 1'b0, "idle def");
    // Long pulse: 100 cycles high.
    inp = 1'b1;
    for (int j = 1; j <= 100; j++) begin
      @(negedge clk);
      check(o_def, j >= 2, $sformatf("def rise j=%0d", j));
      check(o_p,   j >= 5, $sformatf("p rise j=%0d", j));
      check(o_np,  j >= 5, $sformatf("np rise j=%0d", j));
    end
    inp = 1'b0;
    for (int j = 1; j <= 90; j++) begin
      @(negedge clk);
      check(o_def, j < 70, $sformatf("def fall j=%0d", j));
      check(o_p,   j < 9,  $sformatf("p fall j=%0d", j));
      check(o_np,  j < 9,  $sformatf("np fall j=%0d", j));
    end
    // Short pulse: high for 2 edges, shorter than the pre-delay of 5.
    inp = 1'b1;
    @(negedge clk); @(negedge clk);
    inp = 1'b0;
    for (int j = 1; j <= 20; j++) begin
      @(negedge clk);
      check(o_p, j < 9, $sformatf("p short j=%0d", j));
      // Non-preventive: carried to HIGH after edge 5 from the start (j=3),
      // falls POST-1 edges after the low is seen in HIGH (edge j=4).
      check(o_np, (j >= 3) && (j < 3 + 9), $sformatf("np short j=%0d", j));
    end
    // A new rise during the post-delay goes straight back to high.
    inp = 1'b1; repeat (10) @(negedge clk);
    inp = 1'b0; repeat (3) @(negedge clk);
    inp = 1'b1;
    @(negedge clk);
    check(o_p, 1'b1, "p re-rise in post-delay");
    repeat (3) @(negedge clk);
    check(o_p, 1'b1, "p held after re-rise");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
