// clock_gate: glitch-free clock gate for one ring-counter block.
//
// The enable is captured by a latch that is transparent while clk is low and
// closed while clk is high, and the gated clock is clk while the latched
// enable is 1. An enable that settles during the low phase therefore lets the
// next rising edge through whole, and a change of the enable while clk is
// high cannot cut a pulse short. This is the usual integrated clock-gating
// cell; the design's clock-gating scheme needs one per block, the latch form
// is this design's choice. The latch below is intended, it is the gate's
// memory element.
//
// Interface: clk (free-running), en (wanted for the next rising edge),
// gclk (gated clock). Timing: en must be stable before the rising edge.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en;
  end

  assign gclk = clk & en_latched;
endmodule
