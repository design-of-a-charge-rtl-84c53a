// tb_out_pattern: cycle model of the comparator-locked pattern.
//
// Reference behaviour, in enabled cycles: after reset one unlocked cycle
// (output high, lock low); a high phase lasts halfperiod cycles; a low phase
// ends at its cycle n (counted from 1) if comp was high before that edge
// and n >= GRACE + 2 (halfperiod is taken when the high phase starts), or at cycle MAXLOCK without comp, in which case one
// unlocked cycle follows. comp is driven in bursts so that all three exits
// happen; each is counted and must occur.
module tb_out_pattern;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int MAXLOCK = 60, GRACE = 6;
  logic clk = 1'b0, rst = 1'b1;
  logic en = 1'b0, comp = 1'b0;
  logic [12:0] halfperiod = 13'd7;
  logic lock, pat;
  int checks = 0, failures = 0;
  int phase;  // 0 unlocked, 1 high, 2 low
  int age;    // enabled edges since entering the phase
  int hp;     // halfperiod taken when the high phase starts
  int n_comp_exit = 0, n_timeout = 0, n_early_comp = 0;

  always #5 clk = ~clk;

  out_pattern #(.MAXLOCK(MAXLOCK), .GRACE(GRACE)) dut (
    .clk, .rst, .en, .comp, .halfperiod, .lock, .pat_out(pat)
  );

  initial begin
    phase = 0; age = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 6000; i++) begin
      en   = ($urandom % 5) != 0;
      // comp: off for long stretches (timeouts), otherwise random pulses
      comp = ((i / 700) % 2 == 1) ? 1'b0 : (($urandom % 9) == 0);
      if (i % 1500 == 0) halfperiod = 13'(3 + $urandom % 12);
      @(posedge clk);
      if (en) begin
        age++;
        unique case (phase)
          0: begin phase = 1; age = 0; hp = int'(halfperiod); end
          1: if (age >= hp) begin phase = 2; age = 0; end
          default: begin
            if (comp && age < GRACE + 2) n_early_comp++;
            if (comp && age >= GRACE + 2) begin phase = 1; age = 0; hp = int'(halfperiod); n_comp_exit++; end
            else if (age >= MAXLOCK) begin phase = 0; age = 0; n_timeout++; end
          end
        endcase
      end
      @(negedge clk);
      checks++;
      if (pat !== (phase != 2) || lock !== (phase != 0)) begin
        failures++;
        if (failures < 10)
          $display("FAIL i=%0d pat=%0b lock=%0b model phase %0d age %0d", i, pat, lock, phase, age);
      end
    end
    checks += 3;
    if (n_comp_exit == 0) failures++;
    if (n_timeout == 0) failures++;
    if (n_early_comp == 0) failures++;
    $display("comp exits %0d, timeouts %0d, ignored comps %0d", n_comp_exit, n_timeout, n_early_comp);
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
