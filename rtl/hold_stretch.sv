// hold_stretch: widens the hold signal H from the capacitance front-end chip.
//
// While H is high the series capacitor and the actuator are being discharged,
// and the samples that the pipelined ADC delivers around that interval are not
// valid. This block produces a hold that rises PRE_DELAY-1 clock cycles after
// H is first seen high and falls POST_DELAY-1 clock cycles after H is first
// seen low, so that the downstream sample-and-hold freezes a little late (the
// ADC pipeline is still delivering good samples) and releases much later (the
// divider output has settled and the pipeline is flushed).
//
// Four states: REST (out 0), RISING (out 0, counting the pre-delay), HIGH
// (out 1), FALLING (out 1, counting the post-delay). With PREVENTIVE set, an
// H pulse that ends during the pre-delay still produces a post-delay hold;
// without it the pulse is carried through to HIGH once the pre-delay ends.
// A new rising H during FALLING returns straight to HIGH.
//
// The state machine, both delays and the preventive option follow the
// original design; delays of 1 (no extra delay) are handled here as well.
// Timing: the output is a registered state, so with PRE_DELAY = 1 it follows
// H one cycle after H is sampled. Clock: 100 MHz system clock.
module hold_stretch #(
  parameter int unsigned PRE_DELAY  = 2,
  parameter int unsigned POST_DELAY = 70,
  parameter bit          PREVENTIVE = 1'b1
) (
  input  logic clk,
  input  logic rst,
  input  logic inp,
  output logic outp
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CW = $clog2((PRE_DELAY > POST_DELAY ? PRE_DELAY : POST_DELAY) + 1);

  typedef enum logic [1:0] {S_REST, S_RISING, S_HIGH, S_FALLING} st_t;
  st_t st;
  logic [CW-1:0] cnt;  // cycles left in RISING or FALLING

  localparam logic [CW-1:0] PRE_LOAD  = CW'(PRE_DELAY  > 0 ? PRE_DELAY  - 1 : 0);
  localparam logic [CW-1:0] POST_LOAD = CW'(POST_DELAY > 0 ? POST_DELAY - 1 : 0);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st  <= S_REST;
      cnt <= '0;
    end else begin
      unique case (st)
        S_REST: if (inp) begin
          if (PRE_LOAD == 0) st <= S_HIGH;
          else begin st <= S_RISING; cnt <= PRE_LOAD; end
        end
        S_RISING: begin
          if (PREVENTIVE && !inp) begin
            if (POST_LOAD == 0) st <= S_REST;
            else begin st <= S_FALLING; cnt <= POST_LOAD; end
          end else if (cnt == 1) st <= S_HIGH;
          else cnt <= cnt - 1'b1;
        end
        S_HIGH: if (!inp) begin
          if (POST_LOAD == 0) st <= S_REST;
          else begin st <= S_FALLING; cnt <= POST_LOAD; end
        end
        S_FALLING: begin
          if (inp) st <= S_HIGH;
          else if (cnt == 1) st <= S_REST;
          else cnt <= cnt - 1'b1;
        end
        default: st <= S_REST;
      endcase
    end
  end

  assign outp = (st == S_HIGH) || (st == S_FALLING);
endmodule
