// clock_gate: integrated clock-gating cell for the configurable pipeline.
//
// When a unit runs with its pipeline bypassed, its pipeline flip-flops are not
// used, so their clock is switched off. The enable is captured by a latch that
// is transparent while clk is low, and the gated clock is clk AND the latched
// enable; the enable can therefore change at any time in the cycle without
// producing a glitch on gclk. The latch is the intended element of this cell
// (the standard latch-plus-AND clock gate), which is why a latch warning on
// this module stands. Gating the clock with the bypass signal follows the
// document; the latch-based cell structure is the usual choice, not given there.
//
// Ports: clk (free-running), en (1 = clock runs), gclk (gated clock).
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en;
  end

  assign gclk = clk & en_lat;
endmodule
