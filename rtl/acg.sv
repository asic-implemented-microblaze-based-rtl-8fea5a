// acg: AND-type clock gate with a latch on the enable.
//
// A bare AND of clock and enable clips the clock pulse when the enable
// changes while the clock is high. Here the enable first passes a latch that
// is transparent only while the clock is low, so the value seen by the AND
// gate is frozen for the whole high phase and every pulse that gets through
// is a full one. The gated clock idles low when disabled.
//
// Interface: clk_i is the free-running clock, en_i the active-high clock
// enable (typically launched from a positive-edge flop or decoded from such
// flops), gclk_o the gated clock. Timing: en_i sampled during the low phase
// before a rising edge decides whether that edge reaches gclk_o, which gives
// the same cycle behaviour as a flop with a clock enable.
//
// The negative-level latch followed by an AND gate is the structure of the
// source design. The latch is intentional; it is the point of the cell.
module acg (
  input  logic clk_i,
  input  logic en_i,
  output logic gclk_o
);
  logic en_lat;

  always_latch begin
    if (!clk_i) en_lat = en_i;
  end

  assign gclk_o = clk_i & en_lat;
endmodule
