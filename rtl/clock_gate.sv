// clock_gate: glitch-free clock gate (latch plus AND), used by the clock
// controls to stall the phase-shifted pipeline clocks.
//
// The enable passes through a latch that is transparent while the clock is
// low and holds while it is high, so an enable that changes during the high
// phase only takes effect at the next rising edge and the gated clock never
// gets a shortened pulse. The latch is intended: it is the standard
// integrated clock-gating structure. How the document stops its clocks is
// not given; this gate is this design's choice.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;

endmodule
