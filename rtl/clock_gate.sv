// clock_gate: latch-based integrated clock gating cell.
//
// The enable is captured by a latch that is transparent while clk is low, and
// the gated clock is clk AND the latched enable, so gclk never glitches when en
// changes after a rising edge. It is used twice in every PE (two-level clock
// gating): once with the PE enable and once with the zero-detect result of the
// multiplier stage. The latch is intentional: it is the standard gating cell.
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
