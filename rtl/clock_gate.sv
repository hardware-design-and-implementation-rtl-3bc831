// clock_gate: latch-based integrated clock gate (ICG).
//
// gclk = clk AND en_latched, where en_latched is captured by a latch that is
// transparent while clk is low. The enable can therefore change at any time
// during the high phase without clipping or adding a pulse to the gated
// clock: a gated edge occurs exactly at the rising clock edges for which en
// was 1 just before the edge. This is the latch + AND cell the stall
// controller uses to freeze a layer at its clock pin, as the original design
// describes; the test-enable input of library ICG cells is not modelled.
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
