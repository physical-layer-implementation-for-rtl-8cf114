// clock_gate -- latch-based clock gating cell.
//
// The enable is sampled by a latch that is transparent while the clock is low
// and closed while it is high, so the enable may change anywhere in the low
// phase without producing a glitch or a runt pulse on the gated clock:
// gclk = clk AND (en as it was when clk rose). This is the structure an
// integrated clock-gating cell of a standard-cell library has; the latch is
// intended and is the only latch in the design.
//
// Interface: clk in, en in (must be settled before the rising edge of clk),
// gclk out (a copy of clk in cycles whose enable was high).
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_latched;

  always_latch
    if (!clk) en_latched = en;

  assign gclk = clk & en_latched;
endmodule
