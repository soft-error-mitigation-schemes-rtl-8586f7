// hold_delay: minimum-delay (hold) padding on a short path between two
// pipeline registers.
//
// SEM and STEM cells sample the same logic output three times, at CLK1,
// CLK2 = CLK1 + Phi1 and CLK3 = CLK1 + Phi1 + Phi2. Data launched by the
// CLK1 edge must therefore not reach the next register before its CLK3
// edge: the contamination delay of every path must be at least Phi1+Phi2.
// In silicon this is met by delay buffers on short paths inserted under a
// minimum-delay constraint. In this RTL the same requirement is stated by a
// transport delay of DELAY_NS on the stage output, which a simulator
// honours and synthesis ignores (it becomes a hold constraint). Without it
// a zero-delay simulation would let R2/R3 catch the next cycle's value.
module hold_delay #(
  parameter int unsigned W        = 1,
  parameter real         DELAY_NS = 3.5
) (
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  assign #(DELAY_NS * 1ns) q = d;

endmodule
