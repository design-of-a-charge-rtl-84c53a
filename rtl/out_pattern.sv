// out_pattern: main actuator-clock generator, locked to a comparator input.
//
// The pattern drives the clock input of the capacitance front-end chip. It is
// high for HALFPERIOD low-rate cycles (the actuator distance increases), then
// low (distance decreases) until the comparator input comp goes high, which
// starts the next high phase. comp is ignored for the first GRACE cycles of
// the low phase. If comp does not come within MAXLOCK cycles the generator
// drops lock for one cycle (output high, lock low) and starts again with a
// high phase.
//
// States, counters, MAXLOCK and GRACE follow the original design. The
// comparator that drives comp is outside this design and its source is not
// described, so it is a port. Counter widths are sized from MAXLOCK and the
// 13-bit halfperiod range.
//
// Timing: registered state, output is a decode of the state. All activity on
// the low-rate enable en.
module out_pattern #(
  parameter int unsigned MAXLOCK = 15000,
  parameter int unsigned GRACE   = 25
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        comp,
  input  logic [12:0] halfperiod,
  output logic        lock,
  output logic        pat_out
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned LW = $clog2(MAXLOCK + 1);

  typedef enum logic [1:0] {P_NOT_LOCKED, P_INCREASING, P_DECREASING} pst_t;
  pst_t          st;
  logic [LW-1:0] cnt_lock;  // cycles left in the low phase
  logic [12:0]   cnt_dist;  // cycles left in the high phase

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st       <= P_NOT_LOCKED;
      cnt_lock <= LW'(MAXLOCK);
      cnt_dist <= 13'd1;
    end else if (en) begin
      cnt_lock <= (st == P_DECREASING) ? cnt_lock - 1'b1 : LW'(MAXLOCK);
      cnt_dist <= (st == P_INCREASING) ? cnt_dist - 1'b1 : halfperiod;
      unique case (st)
        P_DECREASING:
          if (cnt_lock < LW'(MAXLOCK - GRACE)) begin
            if (comp)               st <= P_INCREASING;
            else if (cnt_lock == 1) st <= P_NOT_LOCKED;
          end
        P_INCREASING:
          if (cnt_dist <= 13'd1) st <= P_DECREASING;
        default: st <= P_INCREASING;
      endcase
    end
  end

  assign pat_out     = (st != P_DECREASING);
  assign lock        = (st != P_NOT_LOCKED);
endmodule
