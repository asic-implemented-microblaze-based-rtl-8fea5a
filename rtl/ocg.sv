// ocg: OR-type clock gate with a latch on the gating input.
//
// An OR of clock and a gating signal holds the output high while the gating
// signal is high and passes the clock while it is low. A bare OR clips the
// pulse when the gating signal changes while the clock is low, so here it
// first passes a latch that is transparent only while the clock is high:
// a change launched by a positive-edge flop lands in the high phase, where the
// OR output is high anyway, and is frozen for the low phase.
//
// Interface: clk_i is the free-running clock, hold_i the active-high gating
// input (high keeps gclk_o high, i.e. suppresses the next rising edge),
// gclk_o the gated clock. Timing: hold_i launched after rising edge N decides
// whether rising edge N+1 reaches gclk_o.
//
// The positive-level latch followed by an OR gate is the structure of the
// source design; naming the input hold_i (it is the inverse of a clock
// enable) is this design's choice. The latch is intentional.
module ocg (
  input  logic clk_i,
  input  logic hold_i,
  output logic gclk_o
);
  logic hold_lat;

  always_latch begin
    if (clk_i) hold_lat = hold_i;
  end

  assign gclk_o = clk_i | hold_lat;
endmodule
